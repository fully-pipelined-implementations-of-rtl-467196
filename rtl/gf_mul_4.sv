// gf_mul_4: GF(2^4) multiplier (GF_MUL_4 of the inversion circuit).
// Combinational. Nibbles {A,B} in the normal basis {Z^4, Z} over GF(2^2),
// Z^2 + Z + N = 0 with N = W^2. Karatsuba-style: three GF(2^2) products, one
// of them scaled by N: p = A*C + e, q = B*D + e, e = N*(A+B)(C+D).
// The two halves are functions in aes_pkg so that the pipelined SubBytes
// can put a register between them.
// The source design names this block; its decomposition is this design's.
module gf_mul_4
  import aes_pkg::*;
(
  input  nib_t x,
  input  nib_t y,
  output nib_t z
);
  assign z = gf4_mul_fin(gf4_mul_pp(x, y));
endmodule
