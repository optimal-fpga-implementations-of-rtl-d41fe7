// rsm_key_schedule: AES-128 round keys computed on the fly, one per clock.
//
// RSM masks only the data path; the key schedule is the standard AES-128
// expansion. rk holds the current round key (the cipher key after load);
// rk_next is the following round key, combinational from rk. advance moves
// rk to rk_next and steps the round constant. SubWord uses four unmasked
// 256x8 S-box ROMs with synchronous read; they are addressed with the value
// rk takes at the next edge, so their output belongs to the registered rk.
//
// Timing: load in cycle 0 -> rk = key in cycle 1, rk_next = round key 1 in
// cycle 1; each advance gives the next round key one cycle later.
// Leaving the key schedule unmasked follows the RSM datapath, where the
// round key is added without a mask; the on-the-fly structure and its timing
// are this design's choice.
module rsm_key_schedule (
  input  logic         clk,
  input  logic         load,
  input  logic [127:0] key,
  input  logic         advance,
  output logic [127:0] rk,
  output logic [127:0] rk_next
);
  import rsm_pkg::*;

  logic [127:0] rk_d;
  logic [7:0]   rcon_q, rcon_d;
  logic [31:0]  rot_d, sub_w, t;
  logic [31:0]  w0, w1, w2, w3;

  always_comb begin
    rk_d   = rk;
    rcon_d = rcon_q;
    if (load) begin
      rk_d   = key;
      rcon_d = 8'h01;
    end else if (advance) begin
      rk_d   = rk_next;
      rcon_d = xtime(rcon_q);
    end
  end

  // RotWord of the last word of the key that will be registered
  assign rot_d = {rk_d[23:0], rk_d[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    rsm_sbox_rom u_rom (.clk(clk), .addr(rot_d[31-8*b -: 8]), .dout(sub_w[31-8*b -: 8]));
  end

  always_ff @(posedge clk) begin
    rk     <= rk_d;
    rcon_q <= rcon_d;
  end

  assign t  = sub_w ^ {rcon_q, 24'h0};
  assign w0 = rk[127:96] ^ t;
  assign w1 = rk[95:64]  ^ w0;
  assign w2 = rk[63:32]  ^ w1;
  assign w3 = rk[31:0]   ^ w2;
  assign rk_next = {w0, w1, w2, w3};

endmodule
