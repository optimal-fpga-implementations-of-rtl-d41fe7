// tb_rsm_aes_core: runs the RSM AES-128 core in both S-box architectures
// (no barrel shifters / barrel shifters with two-half memories) side by side
// on the FIPS-197 example and on random plaintexts, keys and offsets.
// Checks: ciphertext against an independent AES model and the FIPS-197
// value; done exactly 11 clocks after start; busy during the rounds; a start
// while busy is ignored; and, in every round, that the state register holds
// the true AES state xor M_(j+r-1), i.e. it is masked with the rotating mask.
module tb_rsm_aes_core;
  import rsm_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic start;
  logic [127:0] pt, key;
  logic [3:0] offset;
  logic busy [2], done [2], idle [2];
  logic [127:0] ct [2];
  int checks = 0, failures = 0;
  bit seen [16];

  always #5 clk = ~clk;

  rsm_aes_core #(.ARCH(ARCH_SOL2)) dut2 (
    .clk, .rst_n, .start, .plaintext(pt), .key, .offset,
    .busy(busy[0]), .done(done[0]), .idle(idle[0]), .ciphertext(ct[0]),
    .bank(1'b0), .tbl_we(1'b0), .tbl_addr(8'h0), .tbl_data('0),
    .pool_we(1'b0), .pool_set(SET_M), .pool_idx(4'h0), .pool_data('0));

  rsm_aes_core #(.ARCH(ARCH_SOL1)) dut1 (
    .clk, .rst_n, .start, .plaintext(pt), .key, .offset,
    .busy(busy[1]), .done(done[1]), .idle(idle[1]), .ciphertext(ct[1]),
    .bank(1'b0), .tbl_we(1'b0), .tbl_addr(8'h0), .tbl_data('0),
    .pool_we(1'b0), .pool_set(SET_M), .pool_idx(4'h0), .pool_data('0));

  task automatic check(string what, logic [127:0] got, logic [127:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s: got %h expected %h", what, got, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(logic [127:0] p, logic [127:0] k, logic [3:0] j, logic [127:0] expect_ct);
    rks_t rk;
    logic [127:0] s;
    rk = ref_expand(k);
    s = p ^ rk[0];
    @(negedge clk);
    pt = p; key = k; offset = j; start = 1;
    seen[j] = 1;
    #1 check("idle low with start", 128'(idle[0] || idle[1]), 128'd0);
    @(negedge clk);
    start = 0;
    pt = ~p; key = ~k; offset = ~j;  // inputs are only sampled at start
    for (int r = 1; r <= 10; r++) begin
      check($sformatf("busy r%0d", r), 128'({busy[0], busy[1], done[0], done[1]}), 128'b1100);
      check($sformatf("sol2 masked state r%0d", r), dut2.state_q, s ^ ref_m(TB_MASKS, j + r - 1));
      check($sformatf("sol1 masked state r%0d", r), dut1.state_q, s ^ ref_m(TB_MASKS, j + r - 1));
      if (r == 3) begin
        start = 1;  // ignored while busy
        pt = '0;
      end
      if (r < 10) s = ref_mc(ref_sr(ref_sb(s))) ^ rk[r];
      @(negedge clk);
      start = 0;
    end
    // 11 clock edges after the start edge
    check("done", 128'({done[0], done[1], busy[0], busy[1]}), 128'b1100);
    check("sol2 ct", ct[0], expect_ct);
    check("sol1 ct", ct[1], expect_ct);
    @(negedge clk);
    check("done is a pulse", 128'({done[0], done[1]}), 128'd0);
    check("ct held", ct[0], expect_ct);
  endtask

  initial begin
    start = 0; pt = '0; key = '0; offset = '0;
    #1 rst_n = 0;  // reset edge: flops clear before the first clock
    #11 rst_n = 1;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 4'd0,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int t = 0; t < 40; t++) begin
      logic [127:0] p, k;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, (t < 16) ? 4'(t) : 4'($urandom), ref_encrypt(p, k));
    end
    foreach (seen[i]) check($sformatf("offset %0d used", i), 128'(seen[i]), 128'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
