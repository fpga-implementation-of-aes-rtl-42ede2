// aes_dec_round: one registered AES-128 decryption round with the inverse
// dynamic S-box, in the step order InvShiftRows, InvSubBytes,
// InvMixColumns, AddRoundKey.
//
// Because InvMixColumns comes before the key addition, this is the
// equivalent inverse cipher: in a non-final round the encryption round key
// is passed through InvMixColumns before it is XORed in, so
//   out = InvMix(InvSub(InvShift(s))) ^ InvMix(round_key)
//       = InvMix(InvSub(InvShift(s)) ^ round_key).
// A single such round is not the inverse of a single encryption round:
// the steps are regrouped, and only the chain of ten rounds (aes_dec_pipe)
// inverts the ten encryption rounds. With FINAL = 1 neither the
// state nor the key goes through InvMixColumns. InvSubBytes uses
// INV_SBOX[x ^ key7]. The result is registered: one clock per round.
// The step order (InvMixColumns before the key addition) follows the
// published round diagram; transforming the round key to make that order
// correct, and one register per round, are this implementation's choices.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_state,
  input  block_t round_key,   // encryption round key of this round
  input  byte_t  key7,
  output logic   out_valid,
  output block_t out_state
);
  block_t shifted, sub, mixed, dkey;

  assign shifted = inv_shift_rows(in_state);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_dyn_inv_sbox u_isbox (
      .din (shifted[127-8*i -: 8]),
      .key7(key7),
      .dout(sub[127-8*i -: 8])
    );
  end

  if (FINAL) begin : g_final
    assign mixed = sub;
    assign dkey  = round_key;
  end else begin : g_mix
    aes_mix_columns #(.INVERSE(1'b1)) u_imix (.din(sub),       .dout(mixed));
    aes_mix_columns #(.INVERSE(1'b1)) u_kmix (.din(round_key), .dout(dkey));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) out_state <= mixed ^ dkey;
endmodule
