// aes_mix_columns: MixColumns (INVERSE = 0) or InvMixColumns (INVERSE = 1)
// on the four columns of a 128-bit AES state.
//
// Each column [a0 a1 a2 a3] is multiplied in GF(2^8) by the circulant
// matrix (02 03 01 01) for MixColumns or (0E 0B 0D 09) for
// InvMixColumns. Purely combinational.
// Standard AES; nothing here is specific to the dynamic S-box scheme.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);
  localparam byte_t M0 = INVERSE ? 8'h0e : 8'h02;
  localparam byte_t M1 = INVERSE ? 8'h0b : 8'h03;
  localparam byte_t M2 = INVERSE ? 8'h0d : 8'h01;
  localparam byte_t M3 = INVERSE ? 8'h09 : 8'h01;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = din[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++)
        dout[127-8*(4*c+r) -: 8] = gf_mul(a[r], M0) ^ gf_mul(a[(r+1)%4], M1)
                                 ^ gf_mul(a[(r+2)%4], M2) ^ gf_mul(a[(r+3)%4], M3);
    end
  end
endmodule
