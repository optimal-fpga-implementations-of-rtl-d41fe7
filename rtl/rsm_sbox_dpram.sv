// rsm_sbox_dpram: one 512x8 dual-port masked S-box memory of the refreshable
// RSM S-box layer.
//
// The memory holds two copies of masked S-box number INDEX, one per half;
// address bit 8 chooses the half. Port A reads the half in use by the cipher,
// port B writes the new table into the other half, so the masks can be
// renewed while encryption goes on. Both halves start with S'_INDEX of
// BASE_MASKS. Port A: synchronous read, one clock latency. Port B: write only.
// Which half a port addresses is decided by its user (rsm_sbox_layer_sol1).
// The 4 Kb two-half organisation follows the published refresh scheme; the
// initial contents of the second half are this design's choice.
module rsm_sbox_dpram #(
  parameter int           INDEX      = 0,
  parameter logic [127:0] BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic       clk,
  input  logic [8:0] addr_a,
  output logic [7:0] dout_a,
  input  logic [8:0] addr_b,
  input  logic       we_b,
  input  logic [7:0] din_b
);
  import rsm_pkg::*;

  byte_t mem [512];

  initial begin
    for (int x = 0; x < 256; x++) begin
      mem[x]       = masked_sbox(BASE_MASKS, INDEX, byte_t'(x));
      mem[256 + x] = masked_sbox(BASE_MASKS, INDEX, byte_t'(x));
    end
  end

  always_ff @(posedge clk) dout_a <= mem[addr_a];

  always_ff @(posedge clk) if (we_b) mem[addr_b] <= din_b;

endmodule
