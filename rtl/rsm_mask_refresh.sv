// rsm_mask_refresh: renews the masks of the refreshable RSM AES without
// pausing encryption.
//
// The masked S-box memories of the refreshable core have two halves and the
// mask pool two banks; the cipher reads the half/bank selected by bank. On
// start this unit latches a new base mask set m'_0..m'_15 and, during 256
// cycles, writes address x of all sixteen inactive halves with
// S''_k(x) = S(x ^ m'_k) ^ m'_(k+1) (byte k of tbl_data); in the first 48 of
// those cycles it also writes the inactive pool bank: M'_j, MMS'_j and MS'_j
// for j = 0..15 (SET_M, SET_MMS, SET_MS in turn). Then it waits for
// core_idle (no encryption running or starting) and flips bank, so every
// encryption uses one consistent mask set.
//
// The S-box and mask values are computed here in logic; the sequencing, the
// one-address-per-cycle rate and the swap rule are this design's choices.
//
// Timing: start (while busy is low) -> tbl_we high for exactly 256 cycles ->
// bank flips on the first clock edge with core_idle high after that -> busy
// falls with the flip. swaps counts completed swaps (wraps).
module rsm_mask_refresh (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] new_masks,
  input  logic         core_idle,
  output logic         busy,
  output logic         bank,
  output logic         tbl_we,
  output logic [7:0]   tbl_addr,
  output logic [127:0] tbl_data,
  output logic         pool_we,
  output rsm_pkg::mask_set_e pool_set,
  output logic [3:0]   pool_idx,
  output logic [127:0] pool_data,
  output logic [7:0]   swaps
);
  import rsm_pkg::*;

  typedef enum logic [1:0] {R_IDLE, R_WRITE, R_SWAP} rstate_e;

  rstate_e      st_q;
  logic [7:0]   cnt_q;
  logic [127:0] masks_q;
  logic         bank_q;
  logic [7:0]   swaps_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= R_IDLE;
      cnt_q   <= '0;
      masks_q <= '0;
      bank_q  <= 1'b0;
      swaps_q <= '0;
    end else begin
      case (st_q)
        R_IDLE: if (start) begin
          masks_q <= new_masks;
          cnt_q   <= '0;
          st_q    <= R_WRITE;
        end
        R_WRITE: begin
          cnt_q <= cnt_q + 8'd1;
          if (cnt_q == 8'd255) st_q <= R_SWAP;
        end
        R_SWAP: if (core_idle) begin
          bank_q  <= ~bank_q;
          swaps_q <= swaps_q + 8'd1;
          st_q    <= R_IDLE;
        end
        default: st_q <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < 16; k++)
      tbl_data[127-8*k -: 8] = masked_sbox(masks_q, k, cnt_q);
  end

  always_comb begin
    pool_set  = mask_set_e'(cnt_q[5:4]);
    pool_idx  = cnt_q[3:0];
    case (pool_set)
      SET_M:   pool_data = mask_rot(masks_q, int'(pool_idx));
      SET_MMS: pool_data = mask_mms(masks_q, int'(pool_idx));
      default: pool_data = mask_ms(masks_q, int'(pool_idx));
    endcase
  end

  assign tbl_we   = (st_q == R_WRITE);
  assign tbl_addr = cnt_q;
  assign pool_we  = (st_q == R_WRITE) && (cnt_q < 8'd48);
  assign busy     = (st_q != R_IDLE);
  assign bank     = bank_q;
  assign swaps    = swaps_q;

endmodule
