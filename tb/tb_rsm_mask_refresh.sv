// tb_rsm_mask_refresh: starts a refresh with a random mask set and records
// every table and pool write: exactly 256 table writes (addresses 0..255,
// each carrying S''_k(x) = S(x ^ m'_k) ^ m'_(k+1) for k = 0..15) and 48 pool
// writes (M', MMS', MS' for j = 0..15). The bank must not flip while the
// core is busy and must flip once, on the first idle cycle after the writes.
module tb_rsm_mask_refresh;
  import rsm_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic start, core_idle, busy, bank, tbl_we, pool_we;
  logic [127:0] new_masks, tbl_data, pool_data;
  logic [7:0] tbl_addr, swaps;
  mask_set_e pool_set;
  logic [3:0] pool_idx;
  int checks = 0, failures = 0;
  int ntbl, npool, waited;
  logic exp_bank;
  logic [127:0] nm, exp;

  always #5 clk = ~clk;

  rsm_mask_refresh dut (.*);

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

  initial begin
    start = 0; core_idle = 1; new_masks = 0;
    #1 rst_n = 0;  // reset edge: flops clear before the first clock
    #11 rst_n = 1;
    exp_bank = 0;
    for (int r = 0; r < 2; r++) begin
      nm = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      check("bank before", 128'(bank), 128'(exp_bank));
      start = 1; new_masks = nm;
      @(negedge clk);
      start = 0; new_masks = '0;
      core_idle = 0;  // an encryption is running during the whole refresh
      ntbl = 0; npool = 0;
      for (int t = 0; t < 300; t++) begin
        if (tbl_we) begin
          check("tbl_addr", 128'(tbl_addr), 128'(ntbl));
          for (int k = 0; k < 16; k++) exp[127-8*k -: 8] = ref_masked_sbox(nm, k, tbl_addr);
          check($sformatf("tbl_data %0d", tbl_addr), tbl_data, exp);
          ntbl++;
        end
        if (pool_we) begin
          exp = (pool_set == SET_M) ? ref_m(nm, pool_idx) : (pool_set == SET_MMS) ? ref_mms(nm, pool_idx) : ref_ms(nm, pool_idx);
          check($sformatf("pool %0d/%0d", pool_set, pool_idx), pool_data, exp);
          check("pool order", 128'({pool_set, pool_idx}), 128'(npool));
          npool++;
        end
        check("no flip while busy", 128'(bank), 128'(exp_bank));
        @(negedge clk);
      end
      check("table writes", 128'(ntbl), 128'd256);
      check("pool writes", 128'(npool), 128'd48);
      check("still busy", 128'(busy), 128'd1);
      core_idle = 1;
      @(negedge clk);
      exp_bank = ~exp_bank;
      check("bank flipped", 128'(bank), 128'(exp_bank));
      check("idle again", 128'(busy), 128'd0);
      check("swaps", 128'(swaps), 128'(r + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
