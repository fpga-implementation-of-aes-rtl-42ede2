// tb_aes_cbc_top: end-to-end test of CBC-mode AES-128 with the dynamic
// S-box.
// A reference model keeps its own CBC chaining value and computes each
// expected output when a block is accepted; outputs must come out in order
// and match. The test walks through:
//  * key expansion (key_ready 11 clocks after key_load), IV load;
//  * CBC encryption of a stream: each block must wait for the previous
//    ciphertext (stall), so accepted blocks are exactly 12 clocks apart;
//  * CBC decryption of the same stream, back to back at one block per
//    clock, giving the plaintext back;
//  * direction switches with blocks in flight (the pipeline drains first);
//  * key_load and iv_load while busy (ignored), and a key change, which
//    changes the dynamic S-box byte.
// Each mechanism is counted; one that never happened is a failure.
module tb_aes_cbc_top;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, key_load = 0, iv_load = 0, decrypt = 0, in_valid = 0;
  logic [127:0] key, iv, in_block, out_block;
  logic key_ready, in_ready, out_valid, idle;

  aes_cbc_top dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Reference state.
  logic [127:0] m_key, m_chain;
  rk_t          m_rk;
  u8            m_k7;
  logic [127:0] exp_q [$];
  int n_out = 0;
  logic m_dir = 0;                  // direction of the last accepted block
  // Mechanism counters.
  int n_enc = 0, n_dec = 0, n_stall = 0, n_drain = 0, n_b2b = 0, n_key = 0, n_ignored = 0;
  longint last_enc_acc = -1, last_dec_acc = -100;

  always @(negedge clk) if (rst_n && out_valid) begin
    if (exp_q.size() == 0) check(0, "output with nothing expected");
    else begin
      logic [127:0] e;
      e = exp_q.pop_front();
      check(out_block == e, $sformatf("out %h exp %h", out_block, e));
      n_out++;
    end
  end

  task automatic load_key(logic [127:0] k);
    int c;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0; c = 1;
    while (!key_ready && c < 40) begin @(negedge clk); c++; end
    check(c == 11, $sformatf("key ready after %0d clocks", c));
    m_key = k; m_k7 = bget(k, 9); m_rk = expand(k, m_k7, 1);
    n_key++;
  endtask

  task automatic load_iv(logic [127:0] v);
    @(negedge clk);
    iv = v; iv_load = 1;
    @(negedge clk);
    iv_load = 0;
    m_chain = v;
  endtask

  // Offer one block; wait until it is accepted.
  task automatic send(logic [127:0] b, logic dec);
    in_block = b; decrypt = dec; in_valid = 1;
    #1;
    while (!in_ready) begin
      if (!dec && !idle && !m_dir) n_stall++;
      if (!idle && m_dir != dec) n_drain++;
      @(negedge clk); #1;
    end
    // accepted at the next rising edge
    m_dir = dec;
    if (dec) begin
      exp_q.push_back(dec_rk(b, m_rk, m_k7) ^ m_chain);
      m_chain = b;
      if (cyc == last_dec_acc + 1) n_b2b++;
      last_dec_acc = cyc;
      n_dec++;
    end else begin
      m_chain = enc_rk(b ^ m_chain, m_rk, m_k7);
      exp_q.push_back(m_chain);
      if (last_enc_acc >= 0)
        check(cyc - last_enc_acc == 12, $sformatf("encryption blocks %0d clocks apart", cyc - last_enc_acc));
      last_enc_acc = cyc;
      n_enc++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic wait_idle();
    int c = 0;
    while (!(idle && exp_q.size() == 0) && c < 100) begin @(negedge clk); c++; end
    check(idle, "pipeline drained");
  endtask

  initial begin
    logic [127:0] pt [12], ct [12];
    logic [127:0] ivv;
    key = '0; iv = '0; in_block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!key_ready && idle && !in_ready, "reset state");

    // Figure key: selects S-box byte 6F.
    load_key(128'h1cf34612456e9136676f112387aafed0);
    ivv = rand_blk();
    load_iv(ivv);

    // CBC encryption of 12 blocks, offered continuously.
    foreach (pt[i]) pt[i] = rand_blk();
    foreach (pt[i]) send(pt[i], 0);
    wait_idle();
    // collect the ciphertext from the model's view
    begin
      logic [127:0] c;
      c = ivv;
      foreach (pt[i]) begin c = enc_rk(pt[i] ^ c, m_rk, m_k7); ct[i] = c; end
    end

    // CBC decryption, back to back.
    load_iv(ivv);
    last_enc_acc = -1;
    foreach (ct[i]) send(ct[i], 1);
    // Both directions against the model are checked by the output monitor;
    // the model also recomputed the plaintext independently here:
    wait_idle();
    foreach (ct[i]) check((dec_rk(ct[i], m_rk, m_k7) ^ (i == 0 ? ivv : ct[i-1])) == pt[i], "model round trip");

    // key_load and iv_load while blocks are in flight are ignored.
    send(rand_blk(), 1);
    send(rand_blk(), 1);
    @(negedge clk);
    key = rand_blk(); key_load = 1; iv = rand_blk(); iv_load = 1;
    #1 check(!in_ready, "no block accepted during a load request");
    @(negedge clk);
    key_load = 0; iv_load = 0;
    check(key_ready, "key_load while busy ignored");
    n_ignored++;
    wait_idle();

    // New key, random mix of directions with switches in flight.
    load_key(rand_blk());
    load_iv(rand_blk());
    last_enc_acc = -1;
    for (int i = 0; i < 60; i++) begin
      logic d;
      d = (i / 5) % 2 == 1 ? 1'b1 : 1'($urandom_range(0, 3) == 0);
      if (d) last_enc_acc = -1;   // after a switch the spacing is not fixed
      send(rand_blk(), d);
    end
    wait_idle();

    check(n_out == n_enc + n_dec, $sformatf("%0d outputs for %0d blocks", n_out, n_enc + n_dec));
    check(n_enc > 0,     "CBC encryption happened");
    check(n_dec > 0,     "CBC decryption happened");
    check(n_stall > 0,   "encryption chaining stall happened");
    check(n_b2b > 0,     "back-to-back decryption happened");
    check(n_drain > 0,   "direction switch with drain happened");
    check(n_key >= 2,    "key change happened");
    check(n_ignored > 0, "load while busy happened");
    $display("enc=%0d dec=%0d stalls=%0d back_to_back=%0d drains=%0d keys=%0d",
             n_enc, n_dec, n_stall, n_b2b, n_drain, n_key);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
