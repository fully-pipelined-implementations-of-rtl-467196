// aes_ref_pkg: textbook AES-128 reference model for the testbenches.
// Works on byte arrays in the standard polynomial basis (x^8+x^4+x^3+x+1);
// the S-box is the field inverse (a^254) followed by the affine map written
// bit by bit, so it shares nothing with the composite-field RTL.
// Also maps bytes into and out of the RTL's internal basis through the
// printed X^-1 matrix so that the GF(2^4) blocks can be checked against
// plain GF(2^8) arithmetic.
package aes_ref_pkg;
  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;

  function automatic u8 gmul(input u8 a, input u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic u8 ginv(input u8 a);  // a^254, 0 -> 0
    u8 r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic u8 sbox(input u8 a);
    u8 x = ginv(a), y, c = 8'h63;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8] ^ c[i];
    return y;
  endfunction

  function automatic u8 bget(input u128 s, input int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic u128 sub_bytes(input u128 s);
    u128 o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(bget(s, i));
    return o;
  endfunction

  function automatic u128 shift_rows(input u128 s);
    u128 o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = bget(s, 4*((c+r)%4) + r);
    return o;
  endfunction

  function automatic u128 mix_columns(input u128 s);
    u128 o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = gmul(8'h02, bget(s, 4*c+r)) ^ gmul(8'h03, bget(s, 4*c+(r+1)%4))
                              ^ bget(s, 4*c+(r+2)%4) ^ bget(s, 4*c+(r+3)%4);
    return o;
  endfunction

  function automatic u128 round_fn(input u128 s, input u128 k, input bit last);
    u128 t = sub_bytes(shift_rows(s));
    if (!last) t = mix_columns(t);
    return t ^ k;
  endfunction

  function automatic void expand(input u128 key, output u128 rk [0:10]);
    logic [31:0] w [0:43];
    logic [31:0] t;
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r <= 10; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 encrypt(input u128 pt, input u128 key);
    u128 rk [0:10];
    u128 s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = round_fn(s, rk[r], r == 10);
    return s;
  endfunction

  // standard basis -> internal basis, printed X^-1 matrix, row 0 = bit 7
  localparam u8 XI [8] = '{8'hE7, 8'h71, 8'h63, 8'hE1, 8'h9B, 8'h01, 8'h61, 8'h4F};
  function automatic u8 to_int(input u8 a);
    u8 y;
    for (int r = 0; r < 8; r++) y[7-r] = ^(XI[r] & a);
    return y;
  endfunction
  function automatic u8 from_int(input u8 a);
    for (int v = 0; v < 256; v++) if (to_int(u8'(v)) == a) return u8'(v);
    return 8'h00;
  endfunction
  // GF(2^4) subfield element n is the internal byte {n, n}
  function automatic logic [3:0] nib_mul(input logic [3:0] x, input logic [3:0] y);
    u8 p = gmul(from_int({x, x}), from_int({y, y}));
    return to_int(p)[7:4];
  endfunction
  function automatic logic [3:0] nib_inv(input logic [3:0] x);
    return to_int(ginv(from_int({x, x})))[7:4];
  endfunction
endpackage
