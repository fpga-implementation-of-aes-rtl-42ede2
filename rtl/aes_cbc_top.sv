// aes_cbc_top: AES-128 with a key-dependent (dynamic) S-box in CBC mode,
// encryption and decryption.
//
// The dynamic S-box is the standard AES S-box with every entry XORed with
// one byte of the cipher key (key7, chosen by KEY_BYTE_IDX); the inverse
// S-box XORs the same byte into its address. Only the secret key has to
// be shared: both directions derive the S-box from it.
//
// Structure: aes_key_expand (UpdateKey) turns the key into 11 round keys
// and key7; aes_enc_pipe and aes_dec_pipe are fully unrolled 11-stage
// pipelines that share these keys. This block adds the CBC chaining:
//   encrypt: C_i = E(P_i ^ C_{i-1}), C_0 = IV
//   decrypt: P_i = D(C_i) ^ C_{i-1}
//
// Interface and timing:
//  * key_load (one clock, honoured only when idle) starts expansion;
//    key_ready is high 11 clocks later. iv_load (honoured only when idle)
//    sets the chaining value.
//  * Blocks enter with in_valid & in_ready; decrypt is sampled with the
//    block. Results leave with a one-clock out_valid pulse and cannot be
//    held back.
//  * Encryption chains each ciphertext into the next input, so only one
//    encryption block is in flight: a block every 12 clocks (in_ready
//    stays low meanwhile). Decryption has no such dependency: one block
//    per clock, 11 clocks latency; the previous ciphertext of every block
//    travels alongside it in a delay line.
//  * A block whose direction differs from the blocks in flight waits until
//    the pipeline has drained.
// CBC mode with the dynamic S-box is the published configuration; the
// valid/ready interface, the stall for chaining, the drain on a direction
// change and load-only-when-idle are this implementation's choices.
module aes_cbc_top
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BYTE_IDX     = 9,
  parameter bit          DYN_KEY_SCHEDULE = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  output logic   key_ready,
  input  logic   iv_load,
  input  block_t iv,
  input  logic   decrypt,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_block,
  output logic   out_valid,
  output block_t out_block,
  output logic   idle
);
  localparam int unsigned LAT = NR + 1;   // pipeline latency in clocks

  round_keys_t round_keys;
  byte_t       key7;
  logic [3:0]  inflight;     // blocks inside the pipelines
  logic        cur_dec;      // direction of the blocks in flight
  block_t      chain;        // C_{i-1}
  logic        accept, enc_acc, dec_acc;
  logic        enc_ov, dec_ov;
  block_t      enc_ob, dec_ob;
  block_t      mask [LAT];   // C_{i-1} of each decryption block in flight

  assign idle = (inflight == 4'd0);

  aes_key_expand #(
    .KEY_BYTE_IDX    (KEY_BYTE_IDX),
    .DYN_KEY_SCHEDULE(DYN_KEY_SCHEDULE)
  ) u_key (
    .clk, .rst_n,
    .key_load  (key_load && idle),
    .key_in    (key),
    .key_ready,
    .key7,
    .round_keys
  );

  assign in_ready = key_ready && !key_load && !iv_load &&
                    (idle || (cur_dec && decrypt));
  assign accept   = in_valid && in_ready;
  assign enc_acc  = accept && !decrypt;
  assign dec_acc  = accept &&  decrypt;

  aes_enc_pipe u_enc (
    .clk, .rst_n,
    .in_valid (enc_acc),
    .in_block (in_block ^ chain),
    .round_keys,
    .key7,
    .out_valid(enc_ov),
    .out_block(enc_ob)
  );

  aes_dec_pipe u_dec (
    .clk, .rst_n,
    .in_valid (dec_acc),
    .in_block (in_block),
    .round_keys,
    .key7,
    .out_valid(dec_ov),
    .out_block(dec_ob)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
      cur_dec  <= 1'b0;
      chain    <= '0;
    end else begin
      inflight <= inflight + 4'(accept) - 4'(enc_ov || dec_ov);
      if (accept) cur_dec <= decrypt;
      if (iv_load && idle) chain <= iv;
      else if (dec_acc)    chain <= in_block;
      else if (enc_ov)     chain <= enc_ob;
    end
  end

  // Delay line carrying C_{i-1} next to each decryption block.
  always_ff @(posedge clk) begin
    mask[0] <= chain;
    for (int i = 1; i < LAT; i++) mask[i] <= mask[i-1];
  end

  assign out_valid = enc_ov || dec_ov;
  assign out_block = dec_ov ? (dec_ob ^ mask[LAT-1]) : enc_ob;

  // Rules of the chaining: results only for blocks in flight, at most one
  // encryption block in flight, never both pipelines at once.
  a_out_has_block: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> inflight != 4'd0);
  a_one_enc: assert property (@(posedge clk) disable iff (!rst_n)
    (!cur_dec && !idle) |-> !accept);
  a_one_dir: assert property (@(posedge clk) disable iff (!rst_n)
    !(enc_ov && dec_ov));
endmodule
