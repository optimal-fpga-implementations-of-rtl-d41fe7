// tb_rsm_aes_top: end-to-end test of the whole design at its default
// parameters.
//
// Low-cost core: back-to-back encryptions of random blocks under random keys
// with offsets from its own RNG; every ciphertext is checked against an
// independent AES model and the first round's state against plaintext ^
// key ^ M_j. Refreshable core: the same, while new mask sets are loaded
// into the inactive S-box halves and pool bank and swapped in between
// encryptions; after each swap the masked state must follow the new masks
// and the ciphertexts must stay correct. Shared S-box memory: four look-ups
// per clock checked two clocks later.
//
// Mechanisms counted (each must occur): every offset value on both cores,
// table writes during a running encryption, a swap that had to wait for an
// encryption to end, completed swaps, encryptions under refreshed masks,
// RNG reseeding, and quad look-ups.
module tb_rsm_aes_top;
  import tb_aes_ref_pkg::*;

  logic clk = 0, clk2x = 1, rst_n = 1;
  logic s2_start = 0, s2_seed_we = 0, s2_busy, s2_done;
  logic [127:0] s2_plaintext = '0, s2_key = '0, s2_ciphertext;
  logic [15:0] s2_seed = '0, s1_seed = '0;
  logic s1_start = 0, s1_seed_we = 0, s1_busy, s1_done;
  logic [127:0] s1_plaintext = '0, s1_key = '0, s1_ciphertext;
  logic s1_refresh_start = 0, s1_refresh_busy, s1_bank;
  logic [127:0] s1_refresh_masks = '0;
  logic [7:0] q_sbox_in [4];
  logic [7:0] q_sbox_out [4];
  logic [7:0] s1_mask_swaps;

  int checks = 0, failures = 0;
  int n_s2 = 0, n_s1 = 0, n_quad = 0, writes_while_busy = 0, waited_swaps = 0;
  int enc_after_refresh = 0, reseeds = 0;
  bit seen2 [16], seen1 [16];
  logic [127:0] bank_masks [2];
  logic [127:0] pending;
  bit quad_on = 0;
  bit s1_done_flag = 0, s2_done_flag = 0, refresh_done_flag = 0;

  localparam int N_ENC = 200;  // encryptions per core

  always #10 clk = ~clk;
  always #5  clk2x = ~clk2x;

  rsm_aes_top dut (.*);

  task automatic check(string what, logic [127:0] got, logic [127:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%0t %s: got %h expected %h", $time, what, got, e);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- low-cost core ----
  initial begin
    logic [127:0] p, k, e;
    int j;
    @(posedge rst_n);
    for (int t = 0; t < N_ENC; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      e = ref_encrypt(p, k);
      @(negedge clk);
      if (t == N_ENC / 2) begin
        s2_seed_we = 1; s2_seed = 16'(1 + $urandom % 65535);
        @(negedge clk);
        s2_seed_we = 0;
        reseeds++;
      end
      s2_plaintext = p; s2_key = k; s2_start = 1;
      @(negedge clk);
      s2_start = 0;
      j = dut.u_sol2.j_q;
      seen2[j] = 1;
      check("s2 round-1 masked state", dut.u_sol2.state_q, p ^ k ^ ref_m(TB_MASKS, j));
      repeat (10) @(negedge clk);
      check("s2 done after 11 clocks", 128'(s2_done), 128'd1);
      check("s2 ciphertext", s2_ciphertext, e);
      n_s2++;
    end
    s2_done_flag = 1;
  end

  // ---- refreshable core: encryptions ----
  initial begin
    logic [127:0] p, k, e;
    int j;
    @(posedge rst_n);
    for (int t = 0; t < N_ENC; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      e = ref_encrypt(p, k);
      @(negedge clk);
      if (t == 7) begin
        s1_seed_we = 1; s1_seed = 16'(1 + $urandom % 65535);
        @(negedge clk);
        s1_seed_we = 0;
        reseeds++;
      end
      s1_plaintext = p; s1_key = k; s1_start = 1;
      @(negedge clk);
      s1_start = 0;
      j = dut.u_sol1.j_q;
      seen1[j] = 1;
      check("s1 round-1 masked state", dut.u_sol1.state_q, p ^ k ^ ref_m(bank_masks[s1_bank], j));
      if (bank_masks[s1_bank] != TB_MASKS) enc_after_refresh++;
      repeat (10) @(negedge clk);
      check("s1 done after 11 clocks", 128'(s1_done), 128'd1);
      check("s1 ciphertext", s1_ciphertext, e);
      n_s1++;
    end
    s1_done_flag = 1;
  end

  // ---- refreshable core: mask refresh ----
  initial begin
    logic b;
    bank_masks[0] = TB_MASKS;
    bank_masks[1] = TB_MASKS;
    @(posedge rst_n);
    for (int r = 0; r < 3; r++) begin
      repeat (20) @(negedge clk);
      pending = {$urandom, $urandom, $urandom, $urandom};
      b = s1_bank;
      s1_refresh_masks = pending; s1_refresh_start = 1;
      @(negedge clk);
      s1_refresh_start = 0;
      while (dut.u_refresh.st_q != dut.u_refresh.R_SWAP) begin
        if (dut.tbl_we && s1_busy) writes_while_busy++;
        @(negedge clk);
      end
      if (s1_busy) waited_swaps++;
      while (s1_refresh_busy) begin
        check("bank held during refresh", 128'(s1_bank), 128'(b));
        @(negedge clk);
      end
      bank_masks[!b] = pending;
      check("bank swapped", 128'(s1_bank), 128'(!b));
      check("swap count", 128'(s1_mask_swaps), 128'(r + 1));
    end
    refresh_done_flag = 1;
  end

  // ---- shared S-box memory ----
  logic [7:0] qh [2][4];
  int qcyc = 0;
  initial foreach (q_sbox_in[n]) q_sbox_in[n] = '0;
  always @(posedge clk) if (rst_n) begin
    qcyc++;
    if (qcyc > 3) begin
      for (int n = 0; n < 4; n++) check("quad look-up", 128'(q_sbox_out[n]), 128'(ref_masked_sbox(TB_MASKS, n, qh[1][n])));
      n_quad += 4;
    end
    qh[1] = qh[0];
    for (int n = 0; n < 4; n++) qh[0][n] = 8'($urandom);
    for (int n = 0; n < 4; n++) q_sbox_in[n] <= qh[0][n];
  end

  task automatic need(string what, int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int s2_offsets, s1_offsets;
    #1 rst_n = 0;  // reset edge: flops clear before the first clock
    #24 rst_n = 1;
    wait (s1_done_flag && s2_done_flag && refresh_done_flag);
    s2_offsets = 0; s1_offsets = 0;
    foreach (seen2[i]) s2_offsets += seen2[i];
    foreach (seen1[i]) s1_offsets += seen1[i];
    need("low-cost core encryptions", n_s2);
    need("refreshable core encryptions", n_s1);
    checks++;
    if (s2_offsets < 16 || s1_offsets < 16) begin
      failures++;
      $display("offsets seen: %0d and %0d of 16", s2_offsets, s1_offsets);
    end
    need("table writes during an encryption", writes_while_busy);
    need("swaps deferred to the end of an encryption", waited_swaps);
    need("mask swaps", s1_mask_swaps);
    need("encryptions under refreshed masks", enc_after_refresh);
    need("RNG reseeds", reseeds);
    need("quad look-ups", n_quad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
