// aes_ref_pkg: behavioural reference model used by the testbenches.
//
// Written independently of the RTL: the S-box is found by brute-force
// search for the GF(2^8) inverse and the rotate form of the affine map
// (s = b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63); the inverse S-box is the
// search inverse of that table. The cipher works on a 16-byte array and
// decrypts with the straightforward inverse cipher (not the equivalent one
// the RTL uses). Dynamic S-box: S'(x) = S(x) ^ k7, S'^-1(y) = S^-1(y ^ k7).
package aes_ref_pkg;

  typedef byte unsigned u8;
  typedef logic [127:0] blk_t;
  typedef blk_t rk_t [11];

  u8  sb_tab [256];
  u8  isb_tab [256];
  bit tabs_ok = 0;

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    while (b != 0) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic u8 rotl(u8 x, int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void build();
    if (tabs_ok) return;
    for (int x = 0; x < 256; x++) begin
      u8 inv = 0;
      for (int y = 1; y < 256; y++) if (mul(u8'(x), u8'(y)) == 1) inv = u8'(y);
      sb_tab[x] = inv ^ rotl(inv,1) ^ rotl(inv,2) ^ rotl(inv,3) ^ rotl(inv,4) ^ 8'h63;
    end
    for (int x = 0; x < 256; x++) isb_tab[sb_tab[x]] = u8'(x);
    tabs_ok = 1;
  endfunction

  function automatic u8 sbox(u8 x, u8 k7);
    build();
    return sb_tab[x] ^ k7;
  endfunction

  function automatic u8 inv_sbox(u8 y, u8 k7);
    build();
    return isb_tab[y ^ k7];
  endfunction

  function automatic u8 bget(blk_t b, int i);
    return b[127-8*i -: 8];
  endfunction

  function automatic blk_t sub_shift(blk_t s, u8 k7);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = sbox(bget(s, 4*((c+r)%4)+r), k7);
    return o;
  endfunction

  function automatic blk_t mix(blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++) begin
      u8 a0 = bget(s,4*c), a1 = bget(s,4*c+1), a2 = bget(s,4*c+2), a3 = bget(s,4*c+3);
      o[127-8*(4*c+0) -: 8] = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
      o[127-8*(4*c+1) -: 8] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
      o[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
      o[127-8*(4*c+3) -: 8] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
    end
    return o;
  endfunction

  function automatic blk_t inv_mix(blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++) begin
      u8 a0 = bget(s,4*c), a1 = bget(s,4*c+1), a2 = bget(s,4*c+2), a3 = bget(s,4*c+3);
      o[127-8*(4*c+0) -: 8] = mul(a0,14) ^ mul(a1,11) ^ mul(a2,13) ^ mul(a3,9);
      o[127-8*(4*c+1) -: 8] = mul(a0,9) ^ mul(a1,14) ^ mul(a2,11) ^ mul(a3,13);
      o[127-8*(4*c+2) -: 8] = mul(a0,13) ^ mul(a1,9) ^ mul(a2,14) ^ mul(a3,11);
      o[127-8*(4*c+3) -: 8] = mul(a0,11) ^ mul(a1,13) ^ mul(a2,9) ^ mul(a3,14);
    end
    return o;
  endfunction

  // InvShiftRows then InvSubBytes.
  function automatic blk_t inv_shift_sub(blk_t s, u8 k7);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = inv_sbox(bget(s, 4*c+r), k7);
    return o;
  endfunction

  function automatic u8 key_byte(blk_t key, int idx);
    return bget(key, idx);
  endfunction

  // Round keys; the S-box in SubWord is dynamic when dyn = 1.
  function automatic rk_t expand(blk_t key, u8 k7, bit dyn);
    rk_t rk;
    logic [31:0] w [44];
    u8 rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        for (int j = 0; j < 4; j++) t[31-8*j -: 8] = sbox(t[31-8*j -: 8], dyn ? k7 : 8'h00);
        t[31:24] ^= rc;
        rc = mul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t enc_rk(blk_t pt, rk_t rk, u8 k7);
    blk_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = sub_shift(s, k7);
      if (r != 10) s = mix(s);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t dec_rk(blk_t ct, rk_t rk, u8 k7);
    blk_t s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = inv_shift_sub(s, k7);
      s ^= rk[r];
      if (r != 0) s = inv_mix(s);
    end
    return s;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key, int kidx = 9, bit dyn = 1);
    u8 k7 = key_byte(key, kidx);
    return enc_rk(pt, expand(key, k7, dyn), k7);
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key, int kidx = 9, bit dyn = 1);
    u8 k7 = key_byte(key, kidx);
    return dec_rk(ct, expand(key, k7, dyn), k7);
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
