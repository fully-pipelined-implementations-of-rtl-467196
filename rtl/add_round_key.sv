// add_round_key: AES AddRoundKey, a bitwise XOR of the 128-bit state with the
// 128-bit round key. Combinational, one gate level.
module add_round_key
  import aes_pkg::*;
(
  input  block_t s,
  input  block_t rk,
  output block_t s_out
);
  assign s_out = s ^ rk;
endmodule
