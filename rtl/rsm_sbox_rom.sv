// rsm_sbox_rom: unmasked AES S-box as a 256x8 synchronous-read ROM.
//
// Used by the key schedule, which RSM leaves unmasked. The contents are
// computed at elaboration from the S-box definition (GF(2^8) inverse and
// affine map). dout = S(addr) one clock after addr is presented, like an
// FPGA block RAM with its output taken straight from the read port.
// Four such ROMs for the key schedule follow the memory count of the
// published low-cost implementation; the read timing is this design's.
module rsm_sbox_rom (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] dout
);
  import rsm_pkg::*;

  byte_t mem [256];

  initial begin
    for (int a = 0; a < 256; a++) mem[a] = SBOX[a];
  end

  always_ff @(posedge clk) dout <= mem[addr];

endmodule
