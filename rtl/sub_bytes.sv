// sub_bytes: AES SubBytes on a 128-bit state with sixteen logic-only S-boxes,
// split into six segments with an optional pipeline register after each:
//   seg 0: X^-1 basis change (XOR matrix)                        -> {H,L}
//   seg 1: GF_SQ_SCL_4(H^L), and the three GF(2^2) products of
//          GF_MUL_4(H,L)                                        -> {H,L,sq,pp}
//   seg 2: GF_MUL_4 recombination, d = sq ^ H*L, first half of
//          GF_INV_4: t = (N*(dA+dB)^2 + dA*dB)^-1 in GF(2^2)     -> {H,L,d,t}
//   seg 3: second half of GF_INV_4: d^-1 = {t*dB, t*dA}         -> {H,L,d^-1}
//   seg 4: two GF_MUL_4, crossed                                 -> inverse
//   seg 5: MX matrix and XOR with b                              -> S-box output
// This is the S-box of sbox.sv (same arithmetic, same matrices) with cut
// points exposed, so that registers can be placed inside SubBytes as the
// source design does; the two splits inside GF_MUL_4 and GF_INV_4 are this
// design's way of getting stages of about four to six gate levels.
// CUT[i] = 1 registers the output of segment i; latency is the number of
// ones in CUT. No reset: valid bits travel beside it.
module sub_bytes
  import aes_pkg::*;
#(
  parameter logic [5:0] CUT = 6'b111111
) (
  input  logic   clk,
  input  block_t s,
  output block_t s_out
);
  typedef struct packed { nib_t hi, lo, sq; gf4_pp_t pp; } seg1_t;
  typedef struct packed { nib_t hi, lo, d; gf2_t t; } seg2_t;
  typedef struct packed { nib_t hi, lo, d_inv; } seg3_t;

  block_t   m0, m0_q, m4, m4_q, m5;
  seg1_t [15:0] m1, m1_q;
  seg2_t [15:0] m2, m2_q;
  seg3_t [15:0] m3, m3_q;

  for (genvar i = 0; i < 16; i++) begin : g_byte
    nib_t sq, d, p_hi, p_lo;
    // seg 0
    assign m0[8*i +: 8] = lin_map(X_INV, s[8*i +: 8]);
    // seg 1
    gf_sq_scl_4 u_sq (.x(m0_q[8*i+4 +: 4] ^ m0_q[8*i +: 4]), .z(sq));
    assign m1[i] = '{hi: m0_q[8*i+4 +: 4], lo: m0_q[8*i +: 4], sq: sq,
                     pp: gf4_mul_pp(m0_q[8*i+4 +: 4], m0_q[8*i +: 4])};
    // seg 2
    assign d     = m1_q[i].sq ^ gf4_mul_fin(m1_q[i].pp);
    assign m2[i] = '{hi: m1_q[i].hi, lo: m1_q[i].lo, d: d, t: gf4_inv_t(d)};
    // seg 3
    assign m3[i] = '{hi: m2_q[i].hi, lo: m2_q[i].lo, d_inv: gf4_inv_fin(m2_q[i].d, m2_q[i].t)};
    // seg 4
    gf_mul_4    u_phi (.x(m3_q[i].d_inv), .y(m3_q[i].hi), .z(p_hi));
    gf_mul_4    u_plo (.x(m3_q[i].d_inv), .y(m3_q[i].lo), .z(p_lo));
    assign m4[8*i +: 8] = {p_lo, p_hi};
    // seg 5
    assign m5[8*i +: 8] = lin_map(MX, m4_q[8*i +: 8]) ^ AFFINE_B;
  end

  pipe_reg #(.W(128), .EN(CUT[0])) u_r0 (.clk, .d(m0), .q(m0_q));
  pipe_reg #(.W(288), .EN(CUT[1])) u_r1 (.clk, .d(m1), .q(m1_q));
  pipe_reg #(.W(224), .EN(CUT[2])) u_r2 (.clk, .d(m2), .q(m2_q));
  pipe_reg #(.W(192), .EN(CUT[3])) u_r3 (.clk, .d(m3), .q(m3_q));
  pipe_reg #(.W(128), .EN(CUT[4])) u_r4 (.clk, .d(m4), .q(m4_q));
  pipe_reg #(.W(128), .EN(CUT[5])) u_r5 (.clk, .d(m5), .q(s_out));
endmodule
