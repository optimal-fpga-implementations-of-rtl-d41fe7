// rsm_rng4: source of the random 4-bit mask offset of RSM.
//
// A 16-bit Galois LFSR (polynomial x^16+x^14+x^13+x^11+1, period 65535)
// steps every clock; rnd is its four low bits. The LFSR is a stand-in for a
// real entropy source: its length, polynomial and reset value are this
// design's choices. seed_we loads a new state (a zero seed is replaced by the
// reset value, since the all-zero state would lock the LFSR).
module rsm_rng4 #(
  parameter logic [15:0] RESET_STATE = 16'hace1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_we,
  input  logic [15:0] seed,
  output logic [3:0]  rnd
);

  logic [15:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lfsr_q <= RESET_STATE;
    else if (seed_we)  lfsr_q <= (seed == 16'h0) ? RESET_STATE : seed;
    else               lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hb400 : 16'h0);
  end

  assign rnd = lfsr_q[3:0];

endmodule
