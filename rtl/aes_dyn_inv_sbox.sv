// aes_dyn_inv_sbox: one byte of the inverse dynamic S-box.
//
// dout = INV_SBOX_AES[din ^ key7]. The key byte is XORed into the position
// before the constant inverse-S-box ROM, which undoes aes_dyn_sbox:
// INV_SBOX_AES[(SBOX_AES[x] ^ k) ^ k] = x. Purely combinational.
// The formula is the published scheme's inverse dynamic S-box; the
// ROM-plus-XOR structure is this implementation's choice.
module aes_dyn_inv_sbox
  import aes_pkg::*;
(
  input  byte_t din,    // byte to substitute
  input  byte_t key7,   // selected cipher-key byte
  output byte_t dout    // inverse-substituted byte
);
  assign dout = INV_SBOX[din ^ key7];
endmodule
