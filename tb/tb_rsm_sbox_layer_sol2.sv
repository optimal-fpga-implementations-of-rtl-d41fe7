// tb_rsm_sbox_layer_sol2: presents random masked states with random offsets
// every cycle and checks, one cycle later, that byte i of the result is
// S(x_i ^ m_(i+j)) ^ m_(i+j+1) (one-cycle read latency). Every offset is
// exercised.
module tb_rsm_sbox_layer_sol2;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  logic [127:0] addr_state, sub, prev_state;
  logic [3:0]   addr_offset, prev_offset;
  int checks = 0, failures = 0;
  bit seen [16];

  always #5 clk = ~clk;

  rsm_sbox_layer_sol2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_state = '0; addr_offset = '0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (t > 0) begin
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (sub[127-8*i -: 8] !== ref_masked_sbox(TB_MASKS, i + prev_offset, prev_state[127-8*i -: 8])) begin
            failures++;
            $display("t=%0d j=%0d byte %0d: got %h", t, prev_offset, i, sub[127-8*i -: 8]);
          end
        end
      end
      addr_state  = {$urandom, $urandom, $urandom, $urandom};
      addr_offset = (t < 16) ? 4'(t) : 4'($urandom);
      seen[addr_offset] = 1;
      prev_state  = addr_state;
      prev_offset = addr_offset;
    end
    foreach (seen[i]) begin
      checks++;
      if (!seen[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
