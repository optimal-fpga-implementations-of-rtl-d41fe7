// rsm_sbox_rot_rom: one 4096x8 memory of the RSM S-box layer without barrel
// shifters (all 16 masked S-boxes in one block RAM).
//
// Memory number POSITION serves byte POSITION of the state. Block k (the 256
// words at addresses {k, x}) holds masked S-box S'_((POSITION+k) mod 16), so
// the rotation by the mask offset j is built into the contents: reading
// address {j, x} returns S'_(POSITION+j)(x), exactly what a barrel shifter
// would have selected. Synchronous read, one clock latency.
// The rotated contents follow the published barrel-shifter-free layout; the
// address split {j, x} and the read timing are this design's choice.
module rsm_sbox_rot_rom #(
  parameter int             POSITION   = 0,
  parameter logic [127:0]   BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic        clk,
  input  logic [11:0] addr,   // {offset j, masked byte x}
  output logic [7:0]  dout
);
  import rsm_pkg::*;

  byte_t mem [4096];

  initial begin
    for (int k = 0; k < 16; k++)
      for (int x = 0; x < 256; x++)
        mem[256*k + x] = masked_sbox(BASE_MASKS, POSITION + k, byte_t'(x));
  end

  always_ff @(posedge clk) dout <= mem[addr];

endmodule
