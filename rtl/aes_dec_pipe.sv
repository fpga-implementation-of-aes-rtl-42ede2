// aes_dec_pipe: fully unrolled AES-128 decryption with the inverse dynamic
// S-box (equivalent inverse cipher).
//
// Stage 0 registers in_block ^ round_keys[10]; stages 1..9 are decryption
// rounds using round keys 9..1 (each transformed by InvMixColumns inside
// aes_dec_round) and stage 10 is the final round with round key 0. One
// block per clock, latency 11 clocks, no back-pressure. It uses the same
// round keys and key7 as encryption.
// Decryption with the same key and S-box byte follows the published
// scheme; the unrolled equivalent-inverse structure is this
// implementation's choice.
module aes_dec_pipe
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  block_t      in_block,
  input  round_keys_t round_keys,
  input  byte_t       key7,
  output logic        out_valid,
  output block_t      out_block
);
  logic   v [NR+1];
  block_t s [NR+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) s[0] <= in_block ^ round_keys[NR];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_dec_round #(.FINAL(r == NR)) u_round (
      .clk, .rst_n,
      .in_valid (v[r-1]),
      .in_state (s[r-1]),
      .round_key(round_keys[NR-r]),
      .key7,
      .out_valid(v[r]),
      .out_state(s[r])
    );
  end

  assign out_valid = v[NR];
  assign out_block = s[NR];
endmodule
