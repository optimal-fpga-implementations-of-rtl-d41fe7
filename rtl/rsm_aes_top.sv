// rsm_aes_top: FPGA-oriented implementations of AES-128 protected by
// Rotating S-box Masking (RSM), side by side.
//
//   u_sol2  the low-cost core: all 16 masked S-boxes in each of sixteen
//           4096x8 memories, offset in the address, no barrel shifters
//           (rsm_aes_core, ARCH_SOL2), with its offset RNG.
//   u_sol1  the refreshable core: barrel shifters and two-half dual-port
//           S-box memories whose masks rsm_mask_refresh renews while the
//           core keeps encrypting (rsm_aes_core, ARCH_SOL1), with its RNG.
//   u_quad  four masked S-box look-ups per clock from one dual-port memory
//           clocked at 2x (rsm_sbox_quad), brought out on its own ports.
//
// Each part has its own ports, prefixed s2_, s1_ and q_; they share clk and
// rst_n. clk2x (twice clk, edges aligned) would come from a PLL, which is not
// part of this RTL. Per-core timing is that of rsm_aes_core: start -> done
// after 11 clocks. Placing the three side by side is this design's choice.
module rsm_aes_top (
  input  logic         clk,
  input  logic         clk2x,
  input  logic         rst_n,
  // low-cost core (no barrel shifters)
  input  logic         s2_start,
  input  logic [127:0] s2_plaintext,
  input  logic [127:0] s2_key,
  input  logic         s2_seed_we,
  input  logic [15:0]  s2_seed,
  output logic         s2_busy,
  output logic         s2_done,
  output logic [127:0] s2_ciphertext,
  // refreshable core
  input  logic         s1_start,
  input  logic [127:0] s1_plaintext,
  input  logic [127:0] s1_key,
  input  logic         s1_seed_we,
  input  logic [15:0]  s1_seed,
  output logic         s1_busy,
  output logic         s1_done,
  output logic [127:0] s1_ciphertext,
  input  logic         s1_refresh_start,
  input  logic [127:0] s1_refresh_masks,
  output logic         s1_refresh_busy,
  output logic         s1_bank,          // mask half / pool bank in use
  // overclocked shared S-box memory
  input  logic [7:0]   q_sbox_in  [4],
  output logic [7:0]   q_sbox_out [4],
  output logic [7:0]   s1_mask_swaps
);
  import rsm_pkg::*;

  // ---------------- low-cost core ----------------
  logic [3:0] s2_rnd;


  rsm_rng4 #(.RESET_STATE(16'hace1)) u_rng2 (
    .clk (clk), .rst_n (rst_n), .seed_we (s2_seed_we), .seed (s2_seed), .rnd (s2_rnd)
  );

  rsm_aes_core #(.ARCH(ARCH_SOL2)) u_sol2 (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (s2_start),
    .plaintext  (s2_plaintext),
    .key        (s2_key),
    .offset     (s2_rnd),
    .busy       (s2_busy),
    .done       (s2_done),
    .idle       (),
    .ciphertext (s2_ciphertext),
    .bank       (1'b0),
    .tbl_we     (1'b0),
    .tbl_addr   (8'h00),
    .tbl_data   ('0),
    .pool_we    (1'b0),
    .pool_set   (SET_M),
    .pool_idx   (4'h0),
    .pool_data  ('0)
  );

  // ---------------- refreshable core ----------------
  logic [3:0]   s1_rnd;
  logic         s1_idle, tbl_we, pool_we;
  logic [7:0]   tbl_addr;
  logic [127:0] tbl_data, pool_data;
  mask_set_e    pool_set;
  logic [3:0]   pool_idx;

  rsm_rng4 #(.RESET_STATE(16'h1d2b)) u_rng1 (
    .clk (clk), .rst_n (rst_n), .seed_we (s1_seed_we), .seed (s1_seed), .rnd (s1_rnd)
  );

  rsm_mask_refresh u_refresh (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (s1_refresh_start),
    .new_masks (s1_refresh_masks),
    .core_idle (s1_idle),
    .busy      (s1_refresh_busy),
    .bank      (s1_bank),
    .tbl_we    (tbl_we),
    .tbl_addr  (tbl_addr),
    .tbl_data  (tbl_data),
    .pool_we   (pool_we),
    .pool_set  (pool_set),
    .pool_idx  (pool_idx),
    .pool_data (pool_data),
    .swaps     (s1_mask_swaps)
  );

  rsm_aes_core #(.ARCH(ARCH_SOL1)) u_sol1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (s1_start),
    .plaintext  (s1_plaintext),
    .key        (s1_key),
    .offset     (s1_rnd),
    .busy       (s1_busy),
    .done       (s1_done),
    .idle       (s1_idle),
    .ciphertext (s1_ciphertext),
    .bank       (s1_bank),
    .tbl_we     (tbl_we),
    .tbl_addr   (tbl_addr),
    .tbl_data   (tbl_data),
    .pool_we    (pool_we),
    .pool_set   (pool_set),
    .pool_idx   (pool_idx),
    .pool_data  (pool_data)
  );

  // ---------------- overclocked shared S-box memory ----------------
  rsm_sbox_quad #(.FIRST(0)) u_quad (
    .clk      (clk),
    .clk2x    (clk2x),
    .sbox_in  (q_sbox_in),
    .sbox_out (q_sbox_out)
  );

endmodule
