// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
// It is written independently of the RTL: the S-box is computed byte by byte
// as the affine map of x^254 (the inverse in GF(2^8)) using a shift-and-add
// multiplier, and the cipher works on a 4x4 byte array.
// Byte n of a 128-bit block is bits [127-8n -: 8], state s[r][c] = byte r+4c.
// init() must be called once before the model is used. Verilator inlines
// functions at every call, so testbenches call encrypt() from one place.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0] st_t [4][4];

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);   // a^254 = a^-1, and 0 -> 0
    return r;
  endfunction

  logic [7:0] sbox_cache [256];
  bit sbox_ready = 0;

  // Fill the S-box table; call once before using the model.
  function automatic void init();
    logic [7:0] b, s;
    for (int v = 0; v < 256; v++) begin
      b = ginv(8'(v));
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] = s[i] ^ b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
      sbox_cache[v] = s;
    end
    sbox_ready = 1;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return sbox_cache[x];
  endfunction

  function automatic st_t to_st(input blk_t b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127-8*(4*c+r) -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(input st_t s);
    blk_t b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127-8*(4*c+r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic blk_t sub_bytes(input blk_t b);
    blk_t o;
    for (int n = 0; n < 16; n++) o[127-8*n -: 8] = sbox(b[127-8*n -: 8]);
    return o;
  endfunction

  function automatic blk_t shift_rows(input blk_t b);
    st_t s, t;
    s = to_st(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][c] = s[r][(c+r)%4];
    return from_st(t);
  endfunction

  function automatic blk_t mix_columns(input blk_t b);
    st_t s, t;
    s = to_st(b);
    for (int c = 0; c < 4; c++) begin
      t[0][c] = gmul(2, s[0][c]) ^ gmul(3, s[1][c]) ^ s[2][c] ^ s[3][c];
      t[1][c] = s[0][c] ^ gmul(2, s[1][c]) ^ gmul(3, s[2][c]) ^ s[3][c];
      t[2][c] = s[0][c] ^ s[1][c] ^ gmul(2, s[2][c]) ^ gmul(3, s[3][c]);
      t[3][c] = gmul(3, s[0][c]) ^ s[1][c] ^ s[2][c] ^ gmul(2, s[3][c]);
    end
    return from_st(t);
  endfunction

  // All eleven round keys of AES-128, round key k in rk[k].
  function automatic void key_schedule(input blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rc;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]) ^ rc, sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        rc = gmul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k < 11; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    blk_t s;
    blk_t rk [11];
    key_schedule(key, rk);
    s = pt ^ rk[0];
    for (int k = 1; k <= 10; k++) begin
      s = shift_rows(sub_bytes(s));
      if (k < 10) s = mix_columns(s);
      s = s ^ rk[k];
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
