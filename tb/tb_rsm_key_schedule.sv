// tb_rsm_key_schedule: loads AES-128 keys (the FIPS-197 key and random
// ones), advances ten times and compares every round key with an
// independent expansion; also checks the last FIPS-197 round key literally.
module tb_rsm_key_schedule;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  logic load, advance;
  logic [127:0] key, rk, rk_next;
  int checks = 0, failures = 0;
  rks_t exp_rk;

  always #5 clk = ~clk;

  rsm_key_schedule dut (.*);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
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
    load = 0; advance = 0; key = 0;
    for (int t = 0; t < 6; t++) begin
      key = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      exp_rk = ref_expand(key);
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      advance = 1;
      check("rk0", rk, exp_rk[0]);
      for (int r = 1; r <= 10; r++) begin
        check($sformatf("rk_next %0d", r), rk_next, exp_rk[r]);
        @(negedge clk);
        check($sformatf("rk %0d", r), rk, exp_rk[r]);
      end
      if (t == 0) check("FIPS-197 rk10", rk, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
