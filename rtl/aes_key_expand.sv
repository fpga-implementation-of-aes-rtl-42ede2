// aes_key_expand: the UpdateKey step. Latches a 128-bit cipher key, picks
// the key byte that parameterises the dynamic S-box, and expands the 11
// AES-128 round keys.
//
// key7 is byte KEY_BYTE_IDX of the key (byte 0 = key_in[127:120]). The
// default 9 is the byte the design's reference example uses (key
// 1C F3 46 12 45 6E 91 36 67 6F ... selects 6F); it is the 7th byte when
// the key is loaded column by column into a 4x4 matrix and read row by
// row. Any byte may be chosen.
//
// Expansion is iterative: the clock edge that samples key_load latches the
// key, then one round key is produced per clock, so key_ready is high 11
// clocks after that edge. Each step is the standard
// AES-128 recurrence w[i] = w[i-4] ^ f(w[i-1]), except that SubWord uses
// the dynamic S-box (SBOX ^ key7) when DYN_KEY_SCHEDULE = 1, so both the
// key schedule and the rounds see the same key-dependent S-box. With
// DYN_KEY_SCHEDULE = 0 the key schedule is the standard one.
// A key_load during expansion restarts it with the new key.
// Using the dynamic S-box in the key schedule and the byte choice follow
// the published scheme as read here; the iterative one-key-per-clock
// structure and the reset behaviour are this implementation's choices.
module aes_key_expand
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BYTE_IDX     = 9,
  parameter bit          DYN_KEY_SCHEDULE = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key_in,
  output logic        key_ready,
  output byte_t       key7,
  output round_keys_t round_keys
);
  logic [3:0] round_q;       // index of the next round key to produce
  logic       running;
  block_t     prev;
  logic [31:0] rot, subw, temp;
  byte_t      sbox_key;
  byte_t      rcon;

  assign sbox_key = DYN_KEY_SCHEDULE ? key7 : 8'h00;
  assign prev     = round_keys[round_q - 4'd1];

  // RotWord of the last word of the previous round key.
  assign rot = {prev[23:0], prev[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_subw
    aes_dyn_sbox u_sbox (.din(rot[31-8*i -: 8]), .key7(sbox_key), .dout(subw[31-8*i -: 8]));
  end

  // Round constant x^(round-1) in GF(2^8).
  always_comb begin
    rcon = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(round_q)) rcon = xtime(rcon);
  end

  assign temp = subw ^ {rcon, 24'h0};

  block_t next;
  always_comb begin
    next[127:96] = prev[127:96] ^ temp;
    next[95:64]  = prev[95:64]  ^ next[127:96];
    next[63:32]  = prev[63:32]  ^ next[95:64];
    next[31:0]   = prev[31:0]   ^ next[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round_q    <= 4'd1;
      running    <= 1'b0;
      key_ready  <= 1'b0;
      key7       <= '0;
      round_keys <= '0;
    end else if (key_load) begin
      round_keys[0] <= key_in;
      key7          <= key_in[127-8*KEY_BYTE_IDX -: 8];
      round_q       <= 4'd1;
      running       <= 1'b1;
      key_ready     <= 1'b0;
    end else if (running) begin
      round_keys[round_q] <= next;
      if (round_q == 4'(NR)) begin
        running   <= 1'b0;
        key_ready <= 1'b1;
      end else begin
        round_q <= round_q + 4'd1;
      end
    end
  end
endmodule
