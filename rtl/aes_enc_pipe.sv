// aes_enc_pipe: fully unrolled AES-128 encryption with the dynamic S-box.
//
// Stage 0 registers in_block ^ round_keys[0]; stages 1..9 are full rounds
// and stage 10 is the final round without MixColumns. Every stage is one
// register, so the pipeline accepts a new block every clock (128 bits per
// clock) and delivers it 11 clocks later with out_valid. There is no
// back-pressure: blocks always advance. round_keys and key7 must stay
// stable while blocks are in flight.
// One block per clock matches the published throughput figure (128 bits
// per clock); the fully unrolled structure is this implementation's choice.
module aes_enc_pipe
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
  always_ff @(posedge clk) s[0] <= in_block ^ round_keys[0];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_enc_round #(.FINAL(r == NR)) u_round (
      .clk, .rst_n,
      .in_valid (v[r-1]),
      .in_state (s[r-1]),
      .round_key(round_keys[r]),
      .key7,
      .out_valid(v[r]),
      .out_state(s[r])
    );
  end

  assign out_valid = v[NR];
  assign out_block = s[NR];
endmodule
