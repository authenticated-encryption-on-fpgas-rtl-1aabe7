// aes_pkg: types, constants and pure functions shared by every AES-based
// authenticated-encryption core in this library.
//
// Conventions used throughout:
//   * A 128-bit block is `block_t` ([127:0]); byte k of the block (k = 0..15,
//     the first byte on the wire) sits at bits [127-8k -: 8]. Byte k is row
//     k%4, column k/4 of the AES State, so column c is bits [127-32c -: 32]
//     with row 0 in its top byte.
//   * GF(2^128) elements follow the GCM bit order: coefficient of x^i is bit
//     [127-i]. Multiplication is reduced by x^128 + x^7 + x^2 + x + 1.
//
// The S-box table is computed at elaboration from its definition (the
// multiplicative inverse in GF(2^8) mod x^8+x^4+x^3+x+1 followed by the
// affine map), so no table is pasted into the source. The inverse is walked
// with the generator 3: p runs over all non-zero elements as 3^k while q
// runs over their inverses as 3^-k.
//
// The functions here are also used at elaboration to fold a fixed key into
// round-key constants and to derive H, H^2, ... for the key-synthesized cores.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [255:0][7:0] sbox_tbl_t;
  typedef logic [10:0][127:0] round_keys_t;   // index r holds round key k_r

  // GCM reduction constant for a right shift: x^128 = x^7 + x^2 + x + 1.
  localparam block_t GCM_R = {8'he1, 120'h0};

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    logic [15:0] d;
    d = {v, v} << n;
    return d[15:8];
  endfunction

  function automatic sbox_tbl_t gen_sbox();
    sbox_tbl_t t;
    logic [7:0] p, q;
    p = 8'h01;
    q = 8'h01;
    t = '0;
    for (int i = 0; i < 255; i++) begin
      // p <- p * 3
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      // q <- q / 3
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  localparam sbox_tbl_t SBOX = gen_sbox();

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // MixColumns on one column (row 0 in the top byte): a(x) = 03x^3+x^2+x+02.
  function automatic word_t mix_column(input word_t c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // Byte k of a block.
  function automatic logic [7:0] get_byte(input block_t s, input int k);
    return s[127-8*k -: 8];
  endfunction

  // ShiftRows: row r of the State rotates left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = get_byte(s, 4*((c+r)%4) + r);
    return o;
  endfunction

  // Column c of ShiftRows(s): what a 32-bit datapath picks in one clock.
  function automatic word_t shifted_column(input block_t s, input logic [1:0] c);
    word_t w;
    for (int r = 0; r < 4; r++)
      w[31-8*r -: 8] = get_byte(s, 4*((int'(c)+r)%4) + r);
    return w;
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = SBOX[s[127-8*k -: 8]];
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127-32*c -: 32] = mix_column(s[127-32*c -: 32]);
    return o;
  endfunction

  // One encryption round; `last` drops MixColumns (AES round 10).
  function automatic block_t aes_round_f(input block_t s, input block_t rk, input logic last);
    block_t t;
    t = shift_rows(sub_bytes(s));
    if (!last) t = mix_columns(t);
    return t ^ rk;
  endfunction

  // Round constant of round r (1..10).
  function automatic logic [7:0] rcon(input int r);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  // Next AES-128 round key, given SubWord(RotWord(w3)) computed elsewhere.
  function automatic block_t next_round_key(input block_t k, input word_t sub_rot_w3,
                                            input logic [7:0] rc);
    word_t w0, w1, w2, w3;
    w0 = k[127:96] ^ sub_rot_w3 ^ {rc, 24'h0};
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0] ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  function automatic round_keys_t expand_key(input block_t key);
    round_keys_t rk;
    rk[0] = key;
    for (int r = 1; r <= 10; r++)
      rk[r] = next_round_key(rk[r-1], sub_word(rot_word(rk[r-1][31:0])), rcon(r));
    return rk;
  endfunction

  function automatic block_t aes128_encrypt(input block_t key, input block_t pt);
    round_keys_t rk;
    block_t s;
    rk = expand_key(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = aes_round_f(s, rk[r], r == 10);
    return s;
  endfunction

  // GF(2^128) product in GCM bit order (bit-serial definition).
  function automatic block_t gf128_mul(input block_t x, input block_t y);
    block_t z, v;
    z = '0;
    v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z = z ^ v;
      v = v[0] ? ((v >> 1) ^ GCM_R) : (v >> 1);
    end
    return z;
  endfunction

  // H^n, n >= 1.
  function automatic block_t gf128_pow(input block_t h, input int n);
    block_t p;
    p = h;
    for (int i = 1; i < n; i++) p = gf128_mul(p, h);
    return p;
  endfunction

  // GCM counter for 96-bit IVs: IV || 0^31 || 1, then the low 32 bits count.
  function automatic block_t gcm_ctr(input logic [95:0] iv, input logic [31:0] n);
    return {iv, n};
  endfunction

  // AEGIS-128 constant: the Fibonacci sequence modulo 256; const0 holds its
  // first 16 bytes, const1 the next 16.
  function automatic logic [255:0] aegis_const();
    logic [255:0] c;
    logic [7:0] a, b, t;
    a = 8'h00;
    b = 8'h01;
    for (int k = 0; k < 32; k++) begin
      c[255-8*k -: 8] = a;
      t = a + b;
      a = b;
      b = t;
    end
    return c;
  endfunction

  localparam logic [255:0] AEGIS_CONST = aegis_const();
  localparam block_t AEGIS_CONST0 = AEGIS_CONST[255:128];
  localparam block_t AEGIS_CONST1 = AEGIS_CONST[127:0];

  // AESRound(A, B) as AEGIS defines it: a full (non-final) round of A keyed by B.
  function automatic block_t aegis_round(input block_t a, input block_t b);
    return mix_columns(shift_rows(sub_bytes(a))) ^ b;
  endfunction

endpackage
