// rsm_barrel_shifter: rotates a 128-bit block by a whole number of bytes.
//
// RSM routes byte i of the state to masked S-box (i+j) mod 16, where j is the
// 4-bit mask offset, and routes the S-box results back afterwards; these two
// rotations are the barrel shifters of the RSM datapath. Purely
// combinational: 4 stages of 2:1 byte multiplexers (shift by 1, 2, 4, 8).
//
//   LEFT = 1: byte i of dout = byte (i + amt) mod 16 of din
//   LEFT = 0: byte i of dout = byte (i - amt) mod 16 of din
//
// Byte 0 is bits [127:120]. The stage structure is this design's choice.
module rsm_barrel_shifter #(
  parameter bit LEFT = 1'b1
) (
  input  logic [127:0] din,
  input  logic [3:0]   amt,
  output logic [127:0] dout
);

  logic [127:0] stage [5];

  assign stage[0] = din;

  for (genvar s = 0; s < 4; s++) begin : g_stage
    localparam int N = 8 * (1 << s);  // bits moved by this stage
    logic [127:0] rotated;
    // rotating left by n bytes moves byte i+n to byte i
    if (LEFT) begin : g_left
      assign rotated = {stage[s][127-N:0], stage[s][127 -: N]};
    end else begin : g_right
      assign rotated = {stage[s][N-1:0], stage[s][127:N]};
    end
    assign stage[s+1] = amt[s] ? rotated : stage[s];
  end

  assign dout = stage[4];

endmodule
