// mix_columns: AES MixColumns, b_i = 2*a_i + 3*a_(i+1) + a_(i+2) + a_(i+3)
// within each column (indices mod 4, arithmetic in GF(2^8) mod x^8+x^4+x^3+x+1).
// It is computed in two halves of about two gate levels each, so a pipeline
// register can sit in the middle of MixColumns as in the deepest pipelining
// of the source design:
//   first half : a_i and d_i = 2*(a_i + a_(i+1))          (one XOR, one xtime)
//   second half: b_i = d_i + a_(i+1) + a_(i+2) + a_(i+3)  (XOR tree)
// CUT_MID = 1 registers the first half's result (one cycle of latency),
// CUT_MID = 0 leaves the block combinational.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit CUT_MID = 1'b1
) (
  input  logic   clk,
  input  block_t s,
  output block_t s_out
);
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  logic [255:0] half, half_q;  // {a_i, d_i} for bytes 0..15
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        half[255-16*(4*c+r) -: 8] = get_byte(s, 4*c + r);
        half[247-16*(4*c+r) -: 8] = xtime(get_byte(s, 4*c + r) ^ get_byte(s, 4*c + (r+1)%4));
      end

  pipe_reg #(.W(256), .EN(CUT_MID)) u_mid (.clk, .d(half), .q(half_q));

  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s_out[127-8*(4*c+r) -: 8] = half_q[247-16*(4*c+r) -: 8]
                                  ^ half_q[255-16*(4*c+(r+1)%4) -: 8]
                                  ^ half_q[255-16*(4*c+(r+2)%4) -: 8]
                                  ^ half_q[255-16*(4*c+(r+3)%4) -: 8];
endmodule
