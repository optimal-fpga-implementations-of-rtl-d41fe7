// tb_rsm_mask_pool: checks every entry of the three mask sets against the
// definitions M_j, MC(SR(M_j)) ^ M_j and SR(M_j), in both banks, then
// writes a new mask set into bank 1 and checks that bank 1 changed and
// bank 0 did not.
module tb_rsm_mask_pool;
  import rsm_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  logic rd_bank, wr_en, wr_bank;
  logic [3:0] idx_m, idx_mms, idx_ms, wr_idx;
  logic [127:0] m, mms, ms, wr_data;
  mask_set_e wr_set;
  int checks = 0, failures = 0;
  logic [127:0] nm;

  always #5 clk = ~clk;

  rsm_mask_pool #(.BANKS(2)) dut (.*);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_bank(logic b, logic [127:0] base);
    rd_bank = b;
    for (int j = 0; j < 16; j++) begin
      idx_m = 4'(j); idx_mms = 4'(j); idx_ms = 4'((j + 5) % 16);
      #1;
      check($sformatf("M[%0d] bank %0d", j, b), m, ref_m(base, j));
      check($sformatf("MMS[%0d] bank %0d", j, b), mms, ref_mms(base, j));
      check($sformatf("MS[%0d] bank %0d", (j + 5) % 16, b), ms, ref_ms(base, (j + 5) % 16));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_bank = 0; wr_idx = 0; wr_data = 0; wr_set = SET_M;
    check_bank(0, TB_MASKS);
    check_bank(1, TB_MASKS);
    nm = {$urandom, $urandom, $urandom, $urandom};
    for (int s = 0; s < 3; s++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = 1; wr_set = mask_set_e'(s); wr_idx = 4'(j);
        wr_data = (s == 0) ? ref_m(nm, j) : (s == 1) ? ref_mms(nm, j) : ref_ms(nm, j);
      end
    @(negedge clk);
    wr_en = 0;
    check_bank(1, nm);
    check_bank(0, TB_MASKS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
