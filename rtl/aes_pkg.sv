// aes_pkg: types, constants and small GF(2^2) helpers shared by the AES-128
// pipeline.
//
// The S-box works in a composite field: GF(2^8) is built over GF(2^4), GF(2^4)
// over GF(2^2) and GF(2^2) over GF(2), each with a normal basis. A 2-bit
// GF(2^2) element {a1,a0} stands for a1*W^2 + a0*W (W^2+W+1 = 0, so 2'b11 is
// one); a nibble {A,B} stands for A*Z^4 + B*Z; a byte {H,L} for H*Y^16 + L*Y.
// The conversion matrices X^-1 and MX are the ones printed with the S-box
// figure of the source design (row 0 gives the most significant output bit,
// column 0 reads the most significant input bit). The field constants
// (N = W^2 scaling in GF(2^4), nu = {2'b00,2'b01} = W*Z in GF(2^8)) are this
// design's choice: they are the ones for which those two matrices give the
// AES S-box.
//
// The pipeline-register placement follows the balancing idea of the source:
// a round is cut into NUM_SEG logic segments with estimated gate depths
// SEG_DEPTH, and cut_mask() chooses, for a given number of stages per round,
// the register positions that minimise the deepest stage.
package aes_pkg;

  localparam int unsigned NR      = 10;  // rounds of AES-128
  localparam int unsigned NUM_SEG = 9;   // logic segments of one round

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nib_t;
  typedef logic [1:0]   gf2_t;
  typedef block_t       round_keys_t [0:NR];

  // Segment order within a round:
  // 0 ShiftRows + X^-1 map,
  // 1 hi^lo then GF_SQ_SCL_4, and the GF(2^2) products of GF_MUL_4(hi,lo),
  // 2 GF_MUL_4 recombination, XOR into d, first half of GF_INV_4,
  // 3 second half of GF_INV_4, 4 two GF_MUL_4, 5 MX map + b,
  // 6 MixColumns first half, 7 MixColumns second half, 8 AddRoundKey.
  // Estimated two-input gate levels of each segment of this implementation.
  localparam int unsigned SEG_DEPTH [NUM_SEG] = '{3, 5, 6, 3, 6, 3, 2, 2, 1};

  // Standard -> internal basis (X^-1) and internal -> standard combined with
  // the affine matrix (MX); row r produces output bit 7-r.
  localparam byte_t X_INV [8] = '{8'b11100111, 8'b01110001, 8'b01100011, 8'b11100001,
                                  8'b10011011, 8'b00000001, 8'b01100001, 8'b01001111};
  localparam byte_t MX    [8] = '{8'b00101000, 8'b10001000, 8'b01000001, 8'b10101000,
                                  8'b11111000, 8'b01101101, 8'b00110010, 8'b01010010};
  localparam byte_t AFFINE_B = 8'h63;

  // y = M x over GF(2)
  function automatic byte_t lin_map(input byte_t m [8], input byte_t x);
    byte_t y;
    for (int r = 0; r < 8; r++) y[7-r] = ^(m[r] & x);
    return y;
  endfunction

  // GF(2^2), normal basis {W^2, W}
  function automatic gf2_t gf2_mul(input gf2_t x, input gf2_t y);
    logic e;
    e = (x[1] ^ x[0]) & (y[1] ^ y[0]);
    return {(x[1] & y[1]) ^ e, (x[0] & y[0]) ^ e};
  endfunction

  function automatic gf2_t gf2_sq(input gf2_t x);  // also the GF(2^2) inverse
    return {x[0], x[1]};
  endfunction

  function automatic gf2_t gf2_scl_n(input gf2_t x);  // multiply by N = W^2
    return {x[0], x[1] ^ x[0]};
  endfunction

  // GF(2^4), normal basis {Z^4, Z}, split in two halves so that a pipeline
  // register can sit between them.
  // Multiplication {A,B}*{C,D}: first the three GF(2^2) products
  // {A*C, B*D, N*(A+B)(C+D)}, then {A*C + e, B*D + e} with e the third.
  typedef struct packed { gf2_t ac, bd, e; } gf4_pp_t;

  function automatic gf4_pp_t gf4_mul_pp(input nib_t x, input nib_t y);
    return '{ac: gf2_mul(x[3:2], y[3:2]), bd: gf2_mul(x[1:0], y[1:0]),
             e:  gf2_scl_n(gf2_mul(x[3:2] ^ x[1:0], y[3:2] ^ y[1:0]))};
  endfunction

  function automatic nib_t gf4_mul_fin(input gf4_pp_t pp);
    return {pp.ac ^ pp.e, pp.bd ^ pp.e};
  endfunction

  // Inversion of {A,B}: first t = (N*(A+B)^2 + A*B)^-1 in GF(2^2) (the
  // inverse is a squaring), then {t*B, t*A}.
  function automatic gf2_t gf4_inv_t(input nib_t x);
    return gf2_sq(gf2_scl_n(gf2_sq(x[3:2] ^ x[1:0])) ^ gf2_mul(x[3:2], x[1:0]));
  endfunction

  function automatic nib_t gf4_inv_fin(input nib_t x, input gf2_t t);
    return {gf2_mul(t, x[1:0]), gf2_mul(t, x[3:2])};
  endfunction

  // ShiftRows byte map: state byte i = 4*column + row, byte 0 in bits [127:120]
  function automatic byte_t get_byte(input block_t s, input int i);
    return s[127-8*i -: 8];
  endfunction

  // Number of pipeline registers in a round for a cut mask
  function automatic int unsigned count_cuts(input logic [NUM_SEG-1:0] m);
    int unsigned n = 0;
    for (int i = 0; i < NUM_SEG; i++) n += m[i];
    return n;
  endfunction

  // Bit i set = register after segment i. The last segment is always
  // registered; the other stages-1 registers go where the deepest stage is
  // shallowest (first such placement wins a tie).
  function automatic logic [NUM_SEG-1:0] cut_mask(input int unsigned stages);
    logic [NUM_SEG-1:0] best = '1;
    int unsigned best_depth = 1 << 30;
    for (int unsigned m = 0; m < (1 << (NUM_SEG-1)); m++) begin
      logic [NUM_SEG-1:0] cand = {1'b1, m[NUM_SEG-2:0]};
      if (count_cuts(cand) == stages) begin
        int unsigned worst = 0, acc = 0;
        for (int i = 0; i < NUM_SEG; i++) begin
          acc += SEG_DEPTH[i];
          if (cand[i]) begin
            if (acc > worst) worst = acc;
            acc = 0;
          end
        end
        if (worst < best_depth) begin
          best_depth = worst;
          best = cand;
        end
      end
    end
    return best;
  endfunction

endpackage
