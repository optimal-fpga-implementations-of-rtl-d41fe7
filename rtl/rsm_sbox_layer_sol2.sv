// rsm_sbox_layer_sol2: masked SubBytes of the RSM AES without barrel shifters.
//
// Sixteen 4096x8 memories (rsm_sbox_rot_rom), one per state byte. Memory i
// holds all 16 masked S-boxes, rotated by i, so byte i of a state masked with
// M_j is looked up at address {j, byte i} and comes out masked with M_(j+1).
// The offset enters as the upper four address bits instead of steering two
// 128-bit barrel shifters.
//
// Timing: synchronous read. The caller presents the state and offset that
// will be in its state register after the next clock edge (the register's D
// input); sub is then SubBytes' of the registered state during the following
// cycle, so a whole round still takes one clock.
// The memory organisation follows the published design; the addressing with
// the register's next value is this design's choice.
module rsm_sbox_layer_sol2 #(
  parameter logic [127:0] BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic         clk,
  input  logic [127:0] addr_state,   // masked state, mask M_(addr_offset)
  input  logic [3:0]   addr_offset,  // offset j
  output logic [127:0] sub           // masked with M_(j+1), one clock later
);

  for (genvar i = 0; i < 16; i++) begin : g_mem
    rsm_sbox_rot_rom #(.POSITION(i), .BASE_MASKS(BASE_MASKS)) u_rom (
      .clk  (clk),
      .addr ({addr_offset, addr_state[127-8*i -: 8]}),
      .dout (sub[127-8*i -: 8])
    );
  end

endmodule
