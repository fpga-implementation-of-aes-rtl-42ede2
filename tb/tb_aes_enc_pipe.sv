// tb_aes_enc_pipe: the unrolled encryption pipeline.
//  * FIPS-197 known answer (key 000102..0f, standard S-box: key7 = 0 and
//    the standard key schedule).
//  * Random blocks with the dynamic S-box and key schedule, compared with
//    the reference model, in bursts of back-to-back blocks (one per clock)
//    and with random gaps. Every result must come out exactly 11 clocks
//    after its block went in, and a burst must come out without gaps.
module tb_aes_enc_pipe;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0;
  logic [127:0] in_block, out_block;
  logic [10:0][127:0] round_keys;
  logic [7:0] key7;
  logic out_valid;
  longint cyc = 0;

  aes_enc_pipe dut (.clk, .rst_n, .in_valid, .in_block, .round_keys, .key7, .out_valid, .out_block);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // Expected results with the clock they went in.
  logic [127:0] exp_q [$];
  longint       t_q [$];
  int           outs = 0, longest_run = 0, run = 0;

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      run++;
      if (run > longest_run) longest_run = run;
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        logic [127:0] e;
        longint t;
        e = exp_q.pop_front(); t = t_q.pop_front();
        check(out_block == e, $sformatf("out %h exp %h", out_block, e));
        check(cyc - t == 11, $sformatf("latency %0d, expected 11", cyc - t));
        outs++;
      end
    end else run = 0;
  end

  task automatic send(logic [127:0] b, logic [127:0] e);
    in_block = b; in_valid = 1;
    exp_q.push_back(e); t_q.push_back(cyc);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    rk_t rk;
    logic [127:0] key;
    int sent = 0;
    in_block = '0; key7 = '0;
    for (int r = 0; r < 11; r++) round_keys[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    rk = expand(128'h000102030405060708090a0b0c0d0e0f, 8'h00, 0);
    for (int r = 0; r < 11; r++) round_keys[r] = rk[r];
    key7 = 8'h00;
    send(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a); sent++;
    repeat (15) @(negedge clk);

    for (int k = 0; k < 4; k++) begin
      key = rand_blk();
      key7 = bget(key, 9);
      rk = expand(key, key7, 1);
      for (int r = 0; r < 11; r++) round_keys[r] = rk[r];
      // back-to-back burst
      for (int i = 0; i < 40; i++) begin
        logic [127:0] b;
        b = rand_blk();
        send(b, enc_rk(b, rk, key7)); sent++;
      end
      // random gaps
      for (int i = 0; i < 40; i++) begin
        logic [127:0] b;
        b = rand_blk();
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        send(b, enc_rk(b, rk, key7)); sent++;
      end
      repeat (15) @(negedge clk);
    end
    check(outs == sent, $sformatf("%0d outputs for %0d inputs", outs, sent));
    check(longest_run >= 40, $sformatf("longest back-to-back run %0d", longest_run));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
