// aes_dyn_sbox: one byte of the key-dependent (dynamic) S-box.
//
// dout = SBOX_AES[din] ^ key7. The whole 256-entry dynamic S-box is the
// standard AES S-box with every entry XORed with the same cipher-key byte
// key7, so no table has to be rebuilt when the key changes: the XOR is
// applied on the fly after the constant ROM lookup. With key7 = 0 this is
// the standard AES S-box. Purely combinational.
// The construction (standard S-box XOR one key byte) is the published
// dynamic S-box scheme; a ROM plus XOR instead of a stored regenerated
// table is this implementation's choice.
module aes_dyn_sbox
  import aes_pkg::*;
(
  input  byte_t din,    // byte to substitute
  input  byte_t key7,   // selected cipher-key byte
  output byte_t dout    // substituted byte
);
  assign dout = SBOX[din] ^ key7;
endmodule
