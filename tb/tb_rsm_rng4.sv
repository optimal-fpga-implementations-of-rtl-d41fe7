// tb_rsm_rng4: compares the offset stream with a bit-serial model of the
// 16-bit LFSR, checks that all 16 offsets occur, that seeding works and
// that a zero seed does not lock the generator.
module tb_rsm_rng4;
  logic clk = 0, rst_n = 1;
  logic seed_we;
  logic [15:0] seed, model;
  logic [3:0] rnd;
  int checks = 0, failures = 0;
  bit seen [16];
  int nseen;

  always #5 clk = ~clk;

  rsm_rng4 dut (.*);

  function automatic logic [15:0] step(logic [15:0] s);
    // Galois LFSR, taps 16,14,13,11: shift right, xor 0xB400 when bit 0 was 1
    logic [15:0] n;
    n = s >> 1;
    if (s[0]) begin
      n[15] = ~n[15]; n[13] = ~n[13]; n[12] = ~n[12]; n[10] = ~n[10];
    end
    return n;
  endfunction

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
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
    seed_we = 0; seed = 0;
    #1 rst_n = 0;  // reset edge: flops clear before the first clock
    #11 rst_n = 1;
    model = 16'hace1;
    @(negedge clk);  // one step taken at the first edge after reset release
    model = step(model);
    for (int t = 0; t < 2000; t++) begin
      check("stream", rnd, model[3:0]);
      seen[rnd] = 1;
      @(negedge clk);
      model = step(model);
    end
    nseen = 0;
    foreach (seen[i]) nseen += seen[i];
    checks++;
    if (nseen != 16) begin failures++; $display("only %0d offsets seen", nseen); end
    seed_we = 1; seed = 16'h1234;
    @(negedge clk);
    seed_we = 0;
    check("seed", rnd, 4'h4);
    model = 16'h1234;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      model = step(model);
      check("after seed", rnd, model[3:0]);
    end
    seed_we = 1; seed = 16'h0;
    @(negedge clk);
    seed_we = 0;
    check("zero seed", rnd, 4'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
