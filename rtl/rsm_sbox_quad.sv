// rsm_sbox_quad: four masked S-box look-ups per system clock from one true
// dual-port block RAM run at twice the system clock (overclocked BRAM).
//
// The memory (1024x8) holds four masked S-boxes S'_(FIRST+n), n = 0..3, in
// its four quarters. Port A serves look-ups 1 and 2, port B look-ups 3 and 4:
// in the first half of each system cycle a port reads for its first input,
// in the second half for its second, through an address multiplexer. The
// read data are caught in registers and handed to the system clock domain.
//
// Clocks: clk2x must have twice the frequency of clk with rising edges
// aligned (as from a PLL). The half-cycle phase is found by comparing a bit
// toggled by clk with its copy sampled by clk2x, so no reset relation
// between the domains is needed.
//
// Timing: inputs launched at clk edge k are looked up during cycle k+1 and
// the four results are stable on the outputs at clk edge k+2 (latency 2
// system clocks, throughput 4 look-ups per clock). Sharing one memory among
// several S-boxes by overclocking follows the document; the 2x clock (the
// figure also shows a 4x clock for its output registers), the phase
// detection and the latency are this design's choices.
module rsm_sbox_quad #(
  parameter int           FIRST      = 0,
  parameter logic [127:0] BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic       clk,
  input  logic       clk2x,
  input  logic [7:0] sbox_in  [4],
  output logic [7:0] sbox_out [4]
);
  import rsm_pkg::*;

  byte_t mem [1024];

  initial begin
    for (int n = 0; n < 4; n++)
      for (int x = 0; x < 256; x++)
        mem[256*n + x] = masked_sbox(BASE_MASKS, FIRST + n, byte_t'(x));
  end

  // phase detection: second half of the system cycle when tog_q != tog_2x
  logic tog_q, tog_2x, second_half;

  always_ff @(posedge clk)   tog_q  <= ~tog_q;
  always_ff @(posedge clk2x) tog_2x <= tog_q;
  assign second_half = (tog_q != tog_2x);

  logic [9:0] addr_a, addr_b;
  logic [7:0] dout_a, dout_b, hold_a, hold_b;

  assign addr_a = second_half ? {2'd0, sbox_in[0]} : {2'd1, sbox_in[1]};
  assign addr_b = second_half ? {2'd2, sbox_in[2]} : {2'd3, sbox_in[3]};

  always_ff @(posedge clk2x) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
  end

  always_ff @(posedge clk2x) begin
    if (!second_half) begin
      hold_a <= dout_a;
      hold_b <= dout_b;
    end else begin
      sbox_out[0] <= hold_a;
      sbox_out[1] <= dout_a;
      sbox_out[2] <= hold_b;
      sbox_out[3] <= dout_b;
    end
  end

endmodule
