// aes_enc_round: one registered AES-128 encryption round with the dynamic
// S-box.
//
// out_state <= MixColumns(ShiftRows(DynSubBytes(in_state))) ^ round_key,
// where DynSubBytes uses the standard S-box XORed with key7. With
// FINAL = 1 the MixColumns step is left out (last round). The result is
// registered, so the round is one pipeline stage: out_valid/out_state
// follow in_valid/in_state by one clock. The data register is not reset;
// only the valid bit is.
// The round steps follow AES with the published dynamic S-box; one
// register per round is this implementation's choice.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_state,
  input  block_t round_key,
  input  byte_t  key7,
  output logic   out_valid,
  output block_t out_state
);
  block_t sub, shifted, mixed;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_dyn_sbox u_sbox (
      .din (in_state[127-8*i -: 8]),
      .key7(key7),
      .dout(sub[127-8*i -: 8])
    );
  end

  assign shifted = shift_rows(sub);

  if (FINAL) begin : g_final
    assign mixed = shifted;
  end else begin : g_mix
    aes_mix_columns #(.INVERSE(1'b0)) u_mix (.din(shifted), .dout(mixed));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) out_state <= mixed ^ round_key;
endmodule
