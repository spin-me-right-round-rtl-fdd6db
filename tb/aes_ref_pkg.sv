// aes_ref_pkg: reference model for the testbenches, written independently of
// the RTL: GF(2^8) arithmetic in the polynomial basis, the AES S-box as
// inversion (x^254 by square-and-multiply) plus affine map, the AES-128 key
// expansion and encryption (FIPS-197), and the power maps x^26 and x^49 used
// by the masked S-box.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;   // byte 0 in bits [127:120]

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] gpow(input logic [7:0] a, input int e);
    logic [7:0] r, s;
    r = 8'h01; s = a;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) r = gmul(r, s);
      s = gmul(s, s);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] b, s;
    b = gpow(x, 254);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] getb(input blk_t b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    logic [7:0] s [16];
    logic [7:0] k [16];
    logic [7:0] t [16];
    logic [7:0] rc, a0, a1, a2, a3;
    blk_t ct;
    for (int i = 0; i < 16; i++) begin s[i] = getb(pt, i); k[i] = getb(key, i); end
    for (int i = 0; i < 16; i++) s[i] ^= k[i];
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++) t[w + 4*c] = s[w + 4*((c + w) % 4)];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = gmul(a0,2) ^ gmul(a1,3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ gmul(a1,2) ^ gmul(a2,3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ gmul(a2,2) ^ gmul(a3,3);
          s[4*c+3] = gmul(a0,3) ^ a1 ^ a2 ^ gmul(a3,2);
        end
      // next round key
      k[0] ^= sbox(k[13]) ^ rc;
      k[1] ^= sbox(k[14]);
      k[2] ^= sbox(k[15]);
      k[3] ^= sbox(k[12]);
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = gmul(rc, 8'h02);
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) ct[127 - 8*i -: 8] = s[i];
    return ct;
  endfunction

  // Bit n (0..127) of the serial stream of block b: bytes in row-major order
  // (0,4,8,12,1,5,...), each MSB first.
  function automatic logic stream_bit(input blk_t b, input int n);
    int q, idx;
    q   = n / 8;
    idx = (q % 4) * 4 + q / 4;
    return b[127 - 8*idx - (n % 8)];
  endfunction

  function automatic blk_t sub_bytes(input blk_t b);
    blk_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = sbox(getb(b, i));
    return o;
  endfunction

  function automatic blk_t shift_rows(input blk_t b);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[127 - 8*(r + 4*c) -: 8] = getb(b, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic blk_t mix_columns(input blk_t b);
    blk_t o;
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = getb(b, r + 4*c);
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = gmul(a[r], 2) ^ gmul(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return o;
  endfunction

  // round key r from round key r-1 (rc = Rcon of round r)
  function automatic blk_t next_key(input blk_t k, input logic [7:0] rc);
    logic [7:0] w [16];
    blk_t o;
    for (int i = 0; i < 16; i++) w[i] = getb(k, i);
    w[0] ^= sbox(w[13]) ^ rc;
    w[1] ^= sbox(w[14]);
    w[2] ^= sbox(w[15]);
    w[3] ^= sbox(w[12]);
    for (int i = 4; i < 16; i++) w[i] ^= w[i-4];
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = w[i];
    return o;
  endfunction

  // Coordinate 7 of x^e in the normal basis generated by beta, as a function
  // of the normal-basis coordinates v of x (used for G* = x^26, F* = x^49).
  function automatic logic nb_power_bit(input logic [7:0] beta, input int e, input logic [7:0] v);
    logic [7:0] nb [8];
    logic [7:0] x, y, w;
    for (int i = 0; i < 8; i++) nb[i] = gpow(beta, 1 << i);
    x = 0;
    for (int i = 0; i < 8; i++) if (v[i]) x ^= nb[i];
    y = gpow(x, e);
    // search the coordinates of y
    for (int c = 0; c < 256; c++) begin
      w = 0;
      for (int i = 0; i < 8; i++) if (c[i]) w ^= nb[i];
      if (w == y) return c[7];
    end
    return 1'b0;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
