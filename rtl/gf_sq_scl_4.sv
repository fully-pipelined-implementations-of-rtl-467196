// gf_sq_scl_4: GF(2^4) square-and-scale (GF_SQ_SCL_4 of the inversion circuit).
// Combinational. Computes nu * x^2 with nu = W*Z, the constant of the
// GF(2^8)-over-GF(2^4) polynomial Y^2 + Y + nu. Squaring and scaling are both
// GF(2)-linear, so the block is four XOR gates at most:
// z3 = x2^x0, z2 = x3^x1, z1 = x1^x0, z0 = x0.
// The source design names this block; the constant is this design's choice.
module gf_sq_scl_4
  import aes_pkg::*;
(
  input  nib_t x,
  output nib_t z
);
  assign z = {x[2] ^ x[0], x[3] ^ x[1], x[1] ^ x[0], x[0]};
endmodule
