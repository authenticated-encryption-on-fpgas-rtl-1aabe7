// ae_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL and in a different style: the AES
// S-box is found by searching for each byte's inverse and applying the
// affine map bit by bit, the State is a byte array, GF(2^128) products are
// schoolbook products of bit-reversed operands followed by a separate
// reduction, and the modes (GCM, CCM, AEGIS-128) are written from their
// definitions. Test vectors from the published standards are checked
// against these models by the testbenches.
package ae_ref_pkg;

  typedef bit [127:0] blk_t;
  typedef blk_t blk_q_t[$];

  byte unsigned sbx [256];
  bit           sbx_ready = 1'b0;

  function automatic byte unsigned gmul8(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? byte'((a << 1) ^ 8'h1b) : byte'(a << 1);
    end
    return p;
  endfunction

  function automatic void build_sbox();
    for (int x = 0; x < 256; x++) begin
      byte unsigned inv = 0, s = 0;
      bit [7:0] c = 8'h63;
      if (x != 0)
        for (int y = 1; y < 256; y++)
          if (gmul8(byte'(x), byte'(y)) == 1) inv = byte'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
      sbx[x] = s;
    end
    sbx_ready = 1'b1;
  endfunction

  function automatic byte unsigned sb(byte unsigned x);
    if (!sbx_ready) build_sbox();
    return sbx[x];
  endfunction

  typedef byte unsigned st_t [16];

  function automatic st_t to_st(blk_t b);
    st_t s;
    for (int k = 0; k < 16; k++) s[k] = b[127-8*k -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(st_t s);
    blk_t b;
    for (int k = 0; k < 16; k++) b[127-8*k -: 8] = s[k];
    return b;
  endfunction

  // One AES round on bytes: SubBytes, ShiftRows, optional MixColumns, key.
  function automatic blk_t round_ref(blk_t in, blk_t rk, bit mix);
    st_t s = to_st(in), t, k = to_st(rk);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[4*c+r] = sb(s[4*((c+r)%4)+r]);
    if (mix)
      for (int c = 0; c < 4; c++) begin
        byte unsigned a[4];
        for (int r = 0; r < 4; r++) a[r] = t[4*c+r];
        for (int r = 0; r < 4; r++)
          t[4*c+r] = gmul8(a[r], 2) ^ gmul8(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    for (int i = 0; i < 16; i++) t[i] ^= k[i];
    return from_st(t);
  endfunction

  function automatic void key_exp(blk_t key, output blk_t rk[11]);
    bit [31:0] w[44];
    byte unsigned rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      bit [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])} ^ {rc, 24'h0};
        rc = gmul8(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t aes_enc(blk_t key, blk_t pt);
    blk_t rk[11];
    blk_t s;
    key_exp(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = round_ref(s, rk[r], r != 10);
    return s;
  endfunction

  // GF(2^128) product in GCM order: reverse, schoolbook multiply, reduce.
  function automatic blk_t gmul128(blk_t x, blk_t y);
    bit [127:0] a, b;
    bit [254:0] d = '0;
    blk_t z;
    for (int i = 0; i < 128; i++) begin a[i] = x[127-i]; b[i] = y[127-i]; end
    for (int i = 0; i < 128; i++) if (b[i]) d ^= (255'(a) << i);
    for (int i = 254; i >= 128; i--)
      if (d[i]) d ^= (255'(1) << i) ^ (255'('h87) << (i - 128));
    for (int i = 0; i < 128; i++) z[127-i] = d[i];
    return z;
  endfunction

  function automatic blk_t lenblk(int na_bits, int nc_bits);
    return {64'(na_bits), 64'(nc_bits)};
  endfunction

  // AES-GCM, 96-bit IV, whole blocks. ct returns the ciphertext.
  function automatic void gcm(blk_t key, bit [95:0] iv, blk_q_t aad, blk_q_t pt,
                              output blk_q_t ct, output blk_t tag);
    blk_t h = aes_enc(key, '0);
    blk_t x = '0;
    ct = {};
    foreach (aad[i]) x = gmul128(x ^ aad[i], h);
    foreach (pt[i]) begin
      blk_t c = pt[i] ^ aes_enc(key, {iv, 32'(i + 2)});
      ct.push_back(c);
      x = gmul128(x ^ c, h);
    end
    x = gmul128(x ^ lenblk(aad.size() * 128, pt.size() * 128), h);
    tag = x ^ aes_enc(key, {iv, 32'd1});
  endfunction

  // CCM core: CBC-MAC over hdr then pt; CTR with ctr0 + j. Full 128-bit tag.
  function automatic void ccm(blk_t key, blk_t ctr0, blk_q_t hdr, blk_q_t pt,
                              output blk_q_t ct, output blk_t tag);
    blk_t y = '0;
    ct = {};
    foreach (hdr[i]) y = aes_enc(key, y ^ hdr[i]);
    foreach (pt[i]) y = aes_enc(key, y ^ pt[i]);
    foreach (pt[i]) ct.push_back(pt[i] ^ aes_enc(key, {ctr0[127:32], ctr0[31:0] + 32'(i + 1)}));
    tag = y ^ aes_enc(key, ctr0);
  endfunction

  // AEGIS-128 (no associated data).
  function automatic blk_t aegis_r(blk_t a, blk_t b);
    return round_ref(a, b, 1'b1);
  endfunction

  function automatic void aegis_upd(ref blk_t s[5], input blk_t m);
    blk_t n[5];
    n[0] = aegis_r(s[4], s[0] ^ m);
    for (int j = 1; j < 5; j++) n[j] = aegis_r(s[j-1], s[j]);
    s = n;
  endfunction

  function automatic void aegis(blk_t key, blk_t iv, blk_q_t pt,
                                output blk_q_t ct, output blk_t tag);
    bit [7:0] f[32];
    blk_t c0, c1, tmp;
    blk_t s[5];
    bit [63:0] ml;
    f[0] = 0; f[1] = 1;
    for (int i = 2; i < 32; i++) f[i] = f[i-1] + f[i-2];
    for (int i = 0; i < 16; i++) begin c0[127-8*i -: 8] = f[i]; c1[127-8*i -: 8] = f[16+i]; end
    s[0] = iv; s[1] = c1; s[2] = c0; s[3] = key ^ c0; s[4] = key ^ c1;
    for (int i = 0; i < 10; i++) aegis_upd(s, (i % 2 == 0) ? key : key ^ iv);
    ct = {};
    foreach (pt[i]) begin
      ct.push_back(pt[i] ^ s[1] ^ s[4] ^ (s[2] & s[3]));
      aegis_upd(s, pt[i]);
    end
    ml = 64'(pt.size() * 128);
    tmp = '0;
    for (int b = 0; b < 8; b++) tmp[63-8*b -: 8] = ml[8*b +: 8];
    tmp = s[3] ^ tmp;
    for (int i = 0; i < 7; i++) aegis_upd(s, tmp);
    tag = s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4];
  endfunction

  function automatic blk_t rnd_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
