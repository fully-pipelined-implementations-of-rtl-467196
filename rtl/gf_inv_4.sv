// gf_inv_4: GF(2^4) inverter (GF_INV_4 of the inversion circuit).
// Combinational. Same scheme as the GF(2^8) inversion one level down: for
// x = {A,B}, d = N*(A+B)^2 + A*B is inverted in GF(2^2) (a squaring, i.e. a
// bit swap) and the result is {d^-1 * B, d^-1 * A}. Zero maps to zero.
// Both halves are functions in aes_pkg so that the pipelined SubBytes can put
// a register between them.
// The source design names this block; its decomposition is this design's.
module gf_inv_4
  import aes_pkg::*;
(
  input  nib_t x,
  output nib_t z
);
  assign z = gf4_inv_fin(x, gf4_inv_t(x));
endmodule
