// tb_rsm_sbox_quad: drives four new random look-ups on every system clock
// edge (as registers in the clk domain would) and checks, two system clocks
// later, all four results against S'_n(x) = S(x ^ m_n) ^ m_(n+1). clk2x runs
// at twice clk with aligned rising edges. Throughput is checked by
// requiring a correct result for every look-up issued.
module tb_rsm_sbox_quad;
  import tb_aes_ref_pkg::*;

  logic clk = 0, clk2x = 1;
  logic [7:0] sbox_in [4];
  logic [7:0] sbox_out [4];
  logic [7:0] hist [3][4];  // inputs launched 0, 1, 2 edges ago
  int checks = 0, failures = 0, cycles = 0;

  always #10 clk = ~clk;
  always #5  clk2x = ~clk2x;

  rsm_sbox_quad #(.FIRST(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial foreach (sbox_in[n]) sbox_in[n] = '0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 3) begin
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (sbox_out[n] !== ref_masked_sbox(TB_MASKS, 4 + n, hist[1][n])) begin
          failures++;
          $display("cycle %0d look-up %0d: in %h got %h", cycles, n, hist[1][n], sbox_out[n]);
        end
      end
    end
    hist[1] = hist[0];
    for (int n = 0; n < 4; n++) hist[0][n] = 8'($urandom);
    for (int n = 0; n < 4; n++) sbox_in[n] <= hist[0][n];
    if (cycles == 500) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
