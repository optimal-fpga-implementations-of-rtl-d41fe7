// rsm_mask_pool: the pool of precomputed masks of the RSM AES.
//
// Three sets of sixteen 128-bit masks (768 bytes per bank): M_j, the base
// masks rotated by j bytes, used when the plaintext enters; MMS_j =
// MC(SR(M_j)) ^ M_j, which restores mask M_j after ShiftRows and MixColumns
// of a middle round; MS_j = SR(M_j), which removes the mask after the last
// round. Bank 0 (and bank 1 when BANKS = 2) starts with the sets of
// BASE_MASKS. With BANKS = 2 the write port loads the sets of a new base
// mask into one bank while the other is read (mask refresh).
//
// Reads are combinational (a small LUT memory); this is this design's
// choice. Writes take effect at the clock edge.
module rsm_mask_pool #(
  parameter int           BANKS      = 1,
  parameter logic [127:0] BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic         clk,
  input  logic         rd_bank,
  input  logic [3:0]   idx_m,
  input  logic [3:0]   idx_mms,
  input  logic [3:0]   idx_ms,
  output logic [127:0] m,
  output logic [127:0] mms,
  output logic [127:0] ms,
  input  logic         wr_en,
  input  logic         wr_bank,
  input  rsm_pkg::mask_set_e wr_set,
  input  logic [3:0]   wr_idx,
  input  logic [127:0] wr_data
);
  import rsm_pkg::*;

  localparam int AW = (BANKS > 1) ? 5 : 4;

  block_t m_mem   [16*BANKS];
  block_t mms_mem [16*BANKS];
  block_t ms_mem  [16*BANKS];

  initial begin
    for (int b = 0; b < BANKS; b++)
      for (int j = 0; j < 16; j++) begin
        m_mem[16*b + j]   = mask_rot(BASE_MASKS, j);
        mms_mem[16*b + j] = mask_mms(BASE_MASKS, j);
        ms_mem[16*b + j]  = mask_ms(BASE_MASKS, j);
      end
  end

  function automatic logic [AW-1:0] addr(logic b_sel, logic [3:0] idx);
    if (BANKS > 1) return AW'({b_sel, idx});
    else           return AW'(idx);
  endfunction

  assign m   = m_mem[addr(rd_bank, idx_m)];
  assign mms = mms_mem[addr(rd_bank, idx_mms)];
  assign ms  = ms_mem[addr(rd_bank, idx_ms)];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      case (wr_set)
        SET_M:   m_mem[addr(wr_bank, wr_idx)]   <= wr_data;
        SET_MMS: mms_mem[addr(wr_bank, wr_idx)] <= wr_data;
        SET_MS:  ms_mem[addr(wr_bank, wr_idx)]  <= wr_data;
        default: ;
      endcase
    end
  end

endmodule
