// shift_rows: AES ShiftRows. Pure wiring, no gate delay. Row r of the state
// (bytes r, r+4, r+8, r+12; byte 0 is bits [127:120]) is rotated left by r
// byte positions: out[row r, column c] = in[row r, column (c + r) mod 4].
module shift_rows
  import aes_pkg::*;
(
  input  block_t s,
  output block_t s_out
);
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s_out[127-8*(4*c+r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
endmodule
