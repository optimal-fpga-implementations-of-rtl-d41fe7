// tb_rsm_cpa: first-order correlation power analysis on simulated leakage of
// the RSM core (no-barrel-shifter version, default parameters).
//
// Leakage model: the Hamming distance of the state register in its last
// update, from the masked last-round input X ^ M to the ciphertext Y, i.e.
// HW(X ^ Y ^ M), noise-free. For comparison the same attack runs on the
// leakage an unmasked register would give, HW(X ^ Y), with X recomputed
// from Y and the true last round key.
//
// Attack: byte 0 of the last round key, hypothesis g, prediction
// HW(InvS(Y_0 ^ g) ^ Y_0), Pearson correlation over N_TRACES random
// plaintexts under a fixed key, with a random offset per encryption.
// Pass criteria: the unmasked attack finds the key byte (rank 1, correlation
// above 5/sqrt(N)); on the masked register no hypothesis, the true one
// included, correlates above 5/sqrt(N). Every ciphertext is checked against
// the reference model; all 16 offsets must occur. The ranks of the true key
// byte are also reported at checkpoints.
module tb_rsm_cpa;
  import rsm_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int N_TRACES = 200000;
  localparam int CHECKPOINT = 2000;

  logic clk = 0, rst_n = 1;
  logic start = 0;
  logic [127:0] pt = '0, key, ct;
  logic [3:0] offset = '0;
  logic busy, done, idle;
  int checks = 0, failures = 0;
  bit seen [16];

  always #5 clk = ~clk;

  rsm_aes_core dut (
    .clk, .rst_n, .start, .plaintext(pt), .key, .offset,
    .busy, .done, .idle, .ciphertext(ct),
    .bank(1'b0), .tbl_we(1'b0), .tbl_addr(8'h0), .tbl_data('0),
    .pool_we(1'b0), .pool_set(SET_M), .pool_idx(4'h0), .pool_data('0));

  // per value of ciphertext byte 0: trace count and leakage sums
  real n_y [256], sl_y [256], sr_y [256];
  real sl, sll, sr, srr;
  logic [7:0] inv_s [256];
  int hyp [256][256];  // [y0][g]

  task automatic check(string what, logic [127:0] got, logic [127:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s: got %h expected %h", what, got, e);
    end
  endtask

  // correlation of every hypothesis with the masked (m=1) or reference leakage
  function automatic void correlate(bit masked, int n, output real corr [256]);
    real sh, shh, shl, slx, sllx;
    slx  = masked ? sl  : sr;
    sllx = masked ? sll : srr;
    for (int g = 0; g < 256; g++) begin
      sh = 0; shh = 0; shl = 0;
      for (int y = 0; y < 256; y++) begin
        sh  += n_y[y] * hyp[y][g];
        shh += n_y[y] * hyp[y][g] * hyp[y][g];
        shl += (masked ? sl_y[y] : sr_y[y]) * hyp[y][g];
      end
      corr[g] = (n * shl - sh * slx) /
                $sqrt((n * shh - sh * sh) * (n * sllx - slx * slx) + 1.0e-30);
    end
  endfunction

  function automatic real abs_r(real v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int rank_of(real corr [256], int k);
    int r = 1;
    // rank by absolute correlation
    for (int g = 0; g < 256; g++) if (g != k && abs_r(corr[g]) > abs_r(corr[k])) r++;
    return r;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rks_t rk;
    logic [127:0] x_masked, y, x;
    logic [7:0] k0;
    real cm [256], cr [256], thr;
    int l_m, l_r, first_ref_rank1, masked_rank1_hits, n_checkpoints;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    rk = ref_expand(key);
    k0 = rk[10][127:120];
    for (int a = 0; a < 256; a++) inv_s[ref_sbox(8'(a))] = 8'(a);
    for (int y0 = 0; y0 < 256; y0++)
      for (int g = 0; g < 256; g++) hyp[y0][g] = $countones(inv_s[8'(y0) ^ 8'(g)] ^ 8'(y0));
    foreach (n_y[i]) begin n_y[i] = 0; sl_y[i] = 0; sr_y[i] = 0; end
    sl = 0; sll = 0; sr = 0; srr = 0;
    first_ref_rank1 = -1; masked_rank1_hits = 0; n_checkpoints = 0;
    #1 rst_n = 0;  // reset edge: flops clear before the first clock
    #11 rst_n = 1;
    for (int t = 1; t <= N_TRACES; t++) begin
      @(negedge clk);
      pt = {$urandom, $urandom, $urandom, $urandom};
      offset = 4'($urandom);
      seen[offset] = 1;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (9) @(negedge clk);
      x_masked = dut.state_q;            // X ^ M before the last update
      @(negedge clk);
      y = ct;                            // register now holds Y
      if (t % 997 == 1) check("ciphertext", y, ref_encrypt(pt, key));
      x = ref_sr_inv(y ^ rk[10]);
      for (int i = 0; i < 16; i++) x[127-8*i -: 8] = inv_s[x[127-8*i -: 8]];
      l_m = $countones(x_masked ^ y);
      l_r = $countones(x ^ y);
      n_y[y[127:120]]  += 1;
      sl_y[y[127:120]] += l_m;
      sr_y[y[127:120]] += l_r;
      sl += l_m; sll += l_m * l_m;
      sr += l_r; srr += l_r * l_r;
      if (t % CHECKPOINT == 0) begin
        correlate(1, t, cm);
        correlate(0, t, cr);
        n_checkpoints++;
        if (rank_of(cr, k0) == 1 && first_ref_rank1 < 0) first_ref_rank1 = t;
        if (rank_of(cr, k0) != 1) first_ref_rank1 = -1;
        if (rank_of(cm, k0) == 1) masked_rank1_hits++;
      end
    end
    correlate(1, N_TRACES, cm);
    correlate(0, N_TRACES, cr);
    thr = 5.0 / $sqrt(real'(N_TRACES));
    $display("traces: %0d, detection threshold %f", N_TRACES, thr);
    $display("unmasked register: true key rank %0d, correlation %f, rank 1 from %0d traces on",
             rank_of(cr, k0), cr[k0], first_ref_rank1);
    $display("RSM register: true key rank %0d, correlation %f, rank 1 at %0d of %0d checkpoints",
             rank_of(cm, k0), cm[k0], masked_rank1_hits, n_checkpoints);
    check("unmasked attack finds the key", 128'(rank_of(cr, k0)), 128'd1);
    checks++;
    if (!(cr[k0] > thr)) failures++;
    for (int g = 0; g < 256; g++) begin
      checks++;
      if (cm[g] > thr || -cm[g] > thr) begin
        failures++;
        $display("masked leakage correlates with hypothesis %0d: %f", g, cm[g]);
      end
    end
    foreach (seen[i]) check("offset used", 128'(seen[i]), 128'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
