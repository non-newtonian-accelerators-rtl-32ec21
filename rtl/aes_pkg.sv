// aes_pkg: AES-128 (FIPS-197) arithmetic shared by the AES sub-accelerators.
//
// Byte order follows FIPS-197: a 128-bit block holds byte 0 in bits
// [127:120]; byte 4*c+r is row r of column c of the state. The S-box is not
// stored as a table: it is computed as the multiplicative inverse in
// GF(2^8) (x^254, modulo x^8+x^4+x^3+x+1) followed by the affine transform
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
package aes_pkg;
  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  // A word travelling between AES sub-accelerators: the state and the
  // round key the state last had added to it.
  typedef struct packed {
    block_t state;
    block_t key;
  } aes_token_t;

  localparam int unsigned AES_ROUNDS = 10;  // AES-128

  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as x^254 (0 maps to 0).
  function automatic byte_t ginv(input byte_t x);
    byte_t x3, x7, x15, x31, x63, x127;
    x3   = gmul(gmul(x, x), x);
    x7   = gmul(gmul(x3, x3), x);
    x15  = gmul(gmul(x7, x7), x);
    x31  = gmul(gmul(x15, x15), x);
    x63  = gmul(gmul(x31, x31), x);
    x127 = gmul(gmul(x63, x63), x);
    return gmul(x127, x127);
  endfunction

  function automatic byte_t sbox(input byte_t x);
    byte_t b;
    b = ginv(x);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // Round constant of round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  function automatic byte_t get_byte(input block_t s, input int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int unsigned i = 0; i < 16; i++) o[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return o;
  endfunction

  // Row r is rotated left by r columns: new (r,c) = old (r, c+r mod 4).
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    byte_t a0, a1, a2, a3;
    for (int unsigned c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2);
      a3 = get_byte(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127 - 8*(4*c + 3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Round key r from round key r-1 (AES-128 key expansion, one step).
  function automatic block_t next_round_key(input block_t k, input int unsigned r);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96];
    w1 = k[95:64];
    w2 = k[63:32];
    w3 = k[31:0];
    t  = {sbox(w3[23:16]) ^ rcon(r), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Round r of AES-128 applied to a token. Round 0 is the initial
  // AddRoundKey; round 10 omits MixColumns.
  function automatic aes_token_t aes_round(input aes_token_t t, input int unsigned r);
    aes_token_t o;
    if (r == 0) begin
      o.key   = t.key;
      o.state = t.state ^ t.key;
    end else begin
      o.key = next_round_key(t.key, r);
      if (r == AES_ROUNDS) o.state = shift_rows(sub_bytes(t.state)) ^ o.key;
      else                 o.state = mix_columns(shift_rows(sub_bytes(t.state))) ^ o.key;
    end
    return o;
  endfunction
endpackage
