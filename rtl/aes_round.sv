// aes_round: one fully pipelined AES-128 round,
//   ShiftRows -> SubBytes -> MixColumns (not in the last round) -> AddRoundKey.
// The round is flattened into nine logic segments (see aes_pkg) and STAGES
// pipeline registers are placed among them where they balance the gate depth
// per stage best (aes_pkg::cut_mask); one register always closes the round.
// Balancing registers by gate depth rather than putting one after every
// operation is the source design's method; the segment boundaries and the
// depth estimates are this design's own.
// With the default estimates the placements (deepest stage) are:
//   STAGES = 1: after AddRoundKey only                                  (31)
//   STAGES = 2: inside SubBytes after the first half of GF_INV_4, end   (17)
//   STAGES = 4: after the GF_MUL_4 products, after the first half of
//               GF_INV_4, after the output GF_MUL_4, and at the end      (9)
//   STAGES = 8: five registers inside SubBytes, one after it, one inside
//               MixColumns, and one after AddRoundKey                    (6)
// The last round (LAST = 1) has no MixColumns but keeps the same register
// positions, so every round has a latency of exactly STAGES cycles and
// accepts a new state every cycle. The round key rk is read directly from
// the key memory and must stay constant while blocks are in flight.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned STAGES = 8,
  parameter bit          LAST   = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_state,
  input  block_t rk,
  output logic   out_valid,
  output block_t out_state
);
  localparam logic [NUM_SEG-1:0] CUT = cut_mask(STAGES);

  block_t sr, sb, mc, mc_q, ark;

  shift_rows u_sr (.s(in_state), .s_out(sr));
  sub_bytes #(.CUT(CUT[5:0])) u_sb (.clk, .s(sr), .s_out(sb));
  if (!LAST) begin : g_mix
    mix_columns #(.CUT_MID(CUT[6])) u_mc (.clk, .s(sb), .s_out(mc));
  end else begin : g_nomix
    pipe_reg #(.W(128), .EN(CUT[6])) u_pass (.clk, .d(sb), .q(mc));
  end
  pipe_reg #(.W(128), .EN(CUT[7])) u_r7 (.clk, .d(mc), .q(mc_q));
  add_round_key u_ark (.s(mc_q), .rk, .s_out(ark));
  pipe_reg #(.W(128), .EN(CUT[8])) u_r8 (.clk, .d(ark), .q(out_state));

  // valid travels in a shift register as long as the data path
  logic [STAGES-1:0] vld;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= (vld << 1) | STAGES'(in_valid);
  assign out_valid = vld[STAGES-1];

  initial assert (STAGES >= 1 && STAGES <= NUM_SEG && count_cuts(CUT) == STAGES)
    else $fatal(1, "aes_round: STAGES must be 1..%0d", NUM_SEG);
endmodule
