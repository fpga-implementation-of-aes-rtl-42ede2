// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// dynamic S-box design.
//
// A 128-bit block holds the 4x4 AES state. Byte 0 (the first byte sent)
// is bits [127:120]; state byte i sits at row i%4, column i/4, as in
// FIPS-197. The standard AES S-box and its inverse are not typed in as
// tables: gen_sbox()/gen_inv_sbox() compute them at elaboration from their
// definition, S(x) = A * x^-1 + 0x63 in GF(2^8) with the reduction
// polynomial x^8+x^4+x^3+x+1 (0 maps to 0 before the affine map).
// The dynamic S-box of this design is derived from these tables by XOR
// with one cipher-key byte (see aes_dyn_sbox / aes_dyn_inv_sbox).
// The S-box construction is standard AES; the byte order and computing the
// tables at elaboration are choices of this implementation.
package aes_pkg;

  // AES-128: 10 rounds, 11 round keys.
  localparam int unsigned NR = 10;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;
  typedef block_t [NR:0] round_keys_t;   // round_keys[r] for round r
  typedef byte_t sbox_table_t [256];

  // Multiply by x (0x02) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (a^-1 for a != 0, and 0 for a = 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    // 254 = 0b11111110
    for (int i = 1; i < 8; i++) begin
      s = gf_mul(s, s);          // s = a^(2^i)
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // Forward affine map of the AES S-box.
  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Inverse affine map.
  function automatic byte_t inv_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = gf_inv(inv_affine(byte_t'(i)));
    return t;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  // Byte i of a block (byte 0 = bits [127:120]).
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // ShiftRows: row r rotates left by r columns. out byte (r,c) = in (r,c+r).
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  // InvShiftRows: row r rotates right by r columns.
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = s[127-8*(4*c+r) -: 8];
    return o;
  endfunction

endpackage
