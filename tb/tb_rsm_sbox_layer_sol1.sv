// tb_rsm_sbox_layer_sol1: checks the masked S-box layer with barrel shifters
// and two-half memories. Random states and offsets are looked up every
// cycle (one-cycle latency) while, at the same time, the inactive half is
// loaded with the tables of a new mask set; the halves are then swapped and
// the look-ups must follow the new masks. Each phase checks every byte.
module tb_rsm_sbox_layer_sol1;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  logic [127:0] addr_state, sub, prev_state, wr_data;
  logic [3:0]   addr_offset, cur_offset;
  logic         bank, wr_en;
  logic [7:0]   wr_addr;
  int checks = 0, failures = 0;
  int writes_during_reads = 0;
  logic [127:0] active, next_masks;

  always #5 clk = ~clk;

  rsm_sbox_layer_sol1 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: check the result of the previous look-up, present a new one,
  // optionally write table address wa of the inactive half.
  task automatic cycle(bit check_it, bit do_write, int wa);
    @(negedge clk);
    if (check_it) begin
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (sub[127-8*i -: 8] !== ref_masked_sbox(active, i + cur_offset, prev_state[127-8*i -: 8])) begin
          failures++;
          $display("bank %0d j=%0d byte %0d: got %h", bank, cur_offset, i, sub[127-8*i -: 8]);
        end
      end
    end
    addr_state  = {$urandom, $urandom, $urandom, $urandom};
    addr_offset = 4'($urandom);
    // the registered offset that goes with the look-up after the next edge
    cur_offset  = addr_offset;
    prev_state  = addr_state;
    wr_en   = do_write;
    wr_addr = 8'(wa);
    for (int k = 0; k < 16; k++) wr_data[127-8*k -: 8] = ref_masked_sbox(next_masks, k, 8'(wa));
    if (do_write) writes_during_reads++;
  endtask

  initial begin
    addr_state = '0; addr_offset = '0; cur_offset = '0; bank = 0;
    wr_en = 0; wr_addr = 0; wr_data = 0;
    active = TB_MASKS;
    for (int r = 0; r < 3; r++) begin
      next_masks = {$urandom, $urandom, $urandom, $urandom};
      cycle(0, 0, 0);
      for (int t = 0; t < 40; t++) cycle(1, 0, 0);
      for (int a = 0; a < 256; a++) cycle(1, 1, a);   // refresh while reading
      cycle(1, 0, 0);
      // swap halves between look-ups
      bank = ~bank;
      active = next_masks;
      cycle(0, 0, 0);
      for (int t = 0; t < 40; t++) cycle(1, 0, 0);
    end
    checks++;
    if (writes_during_reads != 768) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
