// rsm_aes_core: AES-128 encryption protected by Rotating S-box Masking (RSM).
//
// The state register never holds plaintext-dependent data in the clear: it
// holds X ^ M_j, where M_j is the base mask set rotated by a random offset j
// drawn per encryption. Masked S-boxes S'_k(x) = S(x ^ m_k) ^ m_(k+1) turn a
// state masked with M_j into SubBytes masked with M_(j+1). ShiftRows,
// MixColumns and AddRoundKey are linear, so after them the mask is
// MC(SR(M_(j+1))); adding MMS_(j+1) = MC(SR(M_(j+1))) ^ M_(j+1) brings it
// back to M_(j+1) for the next round. The last round has no MixColumns and
// adds MS_(j+1) = SR(M_(j+1)), which leaves the clear ciphertext.
//
// Datapath, one round per clock:
//   load:          state <= plaintext ^ M_j ^ key
//   rounds 1..9:   state <= MC(SR(SB'(state))) ^ K_r ^ MMS_(j+1), j <= j+1
//   round 10:      state <= SR(SB'(state)) ^ K_10 ^ MS_(j+1)  (the ciphertext)
//
// As in the RSM datapath, the last round writes its result back into the
// state register, which then holds the clear ciphertext until the next start;
// its last transition goes from X ^ M to the ciphertext Y.
//
// ARCH chooses the S-box layer: ARCH_SOL2 (default) uses sixteen 4096x8
// memories with the rotations built into their contents and no barrel
// shifters; ARCH_SOL1 uses barrel shifters and sixteen two-half dual-port
// memories whose inactive half, and the inactive bank of the mask pool, are
// rewritten through the tbl_* and pool_* ports (see rsm_mask_refresh); bank
// selects the half in use. Those ports are ignored with ARCH_SOL2.
//
// Interface and timing: start (while busy is low) samples plaintext, key
// and offset; busy is high for the 10 round cycles; done pulses for one
// cycle 11 clocks after start, with ciphertext valid from then until the
// next start. idle is high when no encryption is running or starting, i.e.
// when the bank may be swapped. The round structure follows the RSM
// architecture; the handshake, register timing and reset are this design's.
module rsm_aes_core #(
  parameter rsm_pkg::arch_e ARCH       = rsm_pkg::ARCH_SOL2,
  parameter logic [127:0]   BASE_MASKS = rsm_pkg::DEFAULT_MASKS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  input  logic [3:0]   offset,
  output logic         busy,
  output logic         done,
  output logic         idle,
  output logic [127:0] ciphertext,
  // mask refresh (ARCH_SOL1 only)
  input  logic         bank,
  input  logic         tbl_we,
  input  logic [7:0]   tbl_addr,
  input  logic [127:0] tbl_data,
  input  logic         pool_we,
  input  rsm_pkg::mask_set_e pool_set,
  input  logic [3:0]   pool_idx,
  input  logic [127:0] pool_data
);
  import rsm_pkg::*;

  localparam int LAST_ROUND = 10;

  logic [127:0] state_q, state_d, sub;
  logic [3:0]   j_q, j_d, j_next;
  logic [3:0]   round_q;
  logic         busy_q, done_q;
  logic [127:0] rk, rk_next;
  logic [127:0] m_in, mms, ms;
  logic         load, rd_bank;

  assign load    = start && !busy_q;
  assign j_next  = j_q + 4'd1;
  assign rd_bank = (ARCH == ARCH_SOL1) ? bank : 1'b0;

  rsm_key_schedule u_keys (
    .clk     (clk),
    .load    (load),
    .key     (key),
    .advance (busy_q),
    .rk      (rk),
    .rk_next (rk_next)
  );

  rsm_mask_pool #(.BANKS((ARCH == ARCH_SOL1) ? 2 : 1), .BASE_MASKS(BASE_MASKS)) u_pool (
    .clk     (clk),
    .rd_bank (rd_bank),
    .idx_m   (offset),
    .idx_mms (j_next),
    .idx_ms  (j_next),
    .m       (m_in),
    .mms     (mms),
    .ms      (ms),
    .wr_en   ((ARCH == ARCH_SOL1) && pool_we),
    .wr_bank (~bank),
    .wr_set  (pool_set),
    .wr_idx  (pool_idx),
    .wr_data (pool_data)
  );

  if (ARCH == ARCH_SOL1) begin : g_sol1
    rsm_sbox_layer_sol1 #(.BASE_MASKS(BASE_MASKS)) u_sbox (
      .clk         (clk),
      .addr_state  (state_d),
      .addr_offset (j_d),
      .cur_offset  (j_q),
      .bank        (bank),
      .sub         (sub),
      .wr_en       (tbl_we),
      .wr_addr     (tbl_addr),
      .wr_data     (tbl_data)
    );
  end else begin : g_sol2
    rsm_sbox_layer_sol2 #(.BASE_MASKS(BASE_MASKS)) u_sbox (
      .clk         (clk),
      .addr_state  (state_d),
      .addr_offset (j_d),
      .sub         (sub)
    );
  end

  always_comb begin
    state_d = state_q;
    j_d     = j_q;
    if (load) begin
      state_d = plaintext ^ m_in ^ key;
      j_d     = offset;
    end else if (busy_q && round_q != 4'(LAST_ROUND)) begin
      state_d = mix_columns(shift_rows(sub)) ^ rk_next ^ mms;
      j_d     = j_next;
    end else if (busy_q) begin
      state_d = shift_rows(sub) ^ rk_next ^ ms;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      j_q     <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      j_q     <= j_d;
      done_q  <= 1'b0;
      if (load) begin
        busy_q  <= 1'b1;
        round_q <= 4'd1;
      end else if (busy_q) begin
        round_q <= round_q + 4'd1;
        if (round_q == 4'(LAST_ROUND)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy       = busy_q;
  assign done       = done_q;
  assign idle       = !busy_q && !start;
  assign ciphertext = state_q;

endmodule
