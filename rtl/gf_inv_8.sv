// gf_inv_8: GF(2^8) inverter in the internal (composite field) basis, as
// drawn in the source design's "GF INV 8" block diagram. Combinational.
// The input byte is split into nibbles H (bits 7:4) and L (bits 3:0).
// GF_SQ_SCL_4(H^L) and GF_MUL_4(H,L) are added to give d, d is inverted by
// GF_INV_4, and two GF_MUL_4 form d^-1*H and d^-1*L; the two products are
// crossed so that the output is {d^-1*L, d^-1*H}. Zero maps to zero.
module gf_inv_8
  import aes_pkg::*;
(
  input  byte_t x,
  output byte_t z
);
  nib_t hi, lo, sq, hl, d, d_inv, p_hi, p_lo;
  assign hi = x[7:4];
  assign lo = x[3:0];
  gf_sq_scl_4 u_sq  (.x(hi ^ lo), .z(sq));
  gf_mul_4    u_m0  (.x(hi), .y(lo), .z(hl));
  assign d = sq ^ hl;
  gf_inv_4    u_inv (.x(d), .z(d_inv));
  gf_mul_4    u_m1  (.x(d_inv), .y(hi), .z(p_hi));
  gf_mul_4    u_m2  (.x(d_inv), .y(lo), .z(p_lo));
  assign z = {p_lo, p_hi};
endmodule
