// rsm_sbox_layer_sol1: masked SubBytes of the RSM AES with refreshable masks.
//
// A barrel shifter sends byte i of a state masked with M_j to masked S-box
// k = (i+j) mod 16; sixteen 512x8 dual-port memories (rsm_sbox_dpram) hold
// S'_k twice, once per half; a second barrel shifter sends S-box k's result
// back to byte (k-j) mod 16. The result is masked with M_(j+1).
//
// Refresh: port A reads the half chosen by bank; port B writes the other
// half, so new masked S-boxes can be loaded while the cipher runs. A write
// stores byte k of wr_data at address wr_addr of S-box k, for all 16 at once.
//
// Timing: synchronous read. addr_state/addr_offset are the state and offset
// the caller will register at the next edge; cur_offset is the offset of the
// state now registered (used by the output shifter). sub is valid in the
// cycle after the address is presented.
// Shifters and two-half memories follow the published refresh scheme; writing
// all sixteen tables in parallel through one shared address is this design's
// choice.
module rsm_sbox_layer_sol1 #(
  parameter logic [127:0] BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic         clk,
  input  logic [127:0] addr_state,
  input  logic [3:0]   addr_offset,
  input  logic [3:0]   cur_offset,
  input  logic         bank,       // half read by the cipher
  output logic [127:0] sub,
  input  logic         wr_en,      // write the inactive half
  input  logic [7:0]   wr_addr,
  input  logic [127:0] wr_data
);

  logic [127:0] to_sbox, from_sbox;

  // byte k of to_sbox = byte (k - j) mod 16 of the state
  rsm_barrel_shifter #(.LEFT(1'b0)) u_shift_in (
    .din (addr_state), .amt (addr_offset), .dout (to_sbox)
  );

  for (genvar k = 0; k < 16; k++) begin : g_mem
    rsm_sbox_dpram #(.INDEX(k), .BASE_MASKS(BASE_MASKS)) u_ram (
      .clk    (clk),
      .addr_a ({bank, to_sbox[127-8*k -: 8]}),
      .dout_a (from_sbox[127-8*k -: 8]),
      .addr_b ({~bank, wr_addr}),
      .we_b   (wr_en),
      .din_b  (wr_data[127-8*k -: 8])
    );
  end

  // byte i of sub = S-box (i + j) mod 16
  rsm_barrel_shifter #(.LEFT(1'b1)) u_shift_out (
    .din (from_sbox), .amt (cur_offset), .dout (sub)
  );

endmodule
