// sbox: one AES S-box in logic only, no table. Combinational.
// S' = MX * inv(X^-1 * S) + b: the byte is mapped to the composite-field
// basis by the X^-1 matrix, inverted by gf_inv_8, mapped back and put through
// the affine matrix in one step by MX, and XORed with b = 8'h63. The two
// matrices and the structure are the source design's; they are constants
// in aes_pkg. Used by the key schedule; the round pipeline uses the same
// arithmetic split into registered segments (sub_bytes).
module sbox
  import aes_pkg::*;
(
  input  byte_t s,
  output byte_t s_out
);
  byte_t inv;
  gf_inv_8 u_inv (.x(lin_map(X_INV, s)), .z(inv));
  assign s_out = lin_map(MX, inv) ^ AFFINE_B;
endmodule
