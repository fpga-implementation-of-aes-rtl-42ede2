// tb_aes_key_expand: key schedule checks.
//  * Standard schedule (DYN_KEY_SCHEDULE = 0) with the FIPS-197 key
//    2b7e1516..: round keys 1 and 10 against the published values.
//  * Dynamic schedule (default) against the reference model for random
//    keys, key7 = key byte 9, and the figure's key whose byte 9 is 6F.
//  * key_ready rises exactly 11 clocks after key_load (1 to latch, 10 to expand); a key_load while
//    expanding restarts with the new key.
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, key_load = 0;
  logic [127:0] key_in;
  logic ready, ready_s;
  logic [7:0] key7, key7_s;
  logic [10:0][127:0] rk, rk_s;

  aes_key_expand dut (.clk, .rst_n, .key_load, .key_in, .key_ready(ready), .key7, .round_keys(rk));
  aes_key_expand #(.DYN_KEY_SCHEDULE(1'b0)) dut_s (.clk, .rst_n, .key_load, .key_in,
                   .key_ready(ready_s), .key7(key7_s), .round_keys(rk_s));

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

  // Load a key and count clocks until key_ready.
  task automatic load(logic [127:0] k, output int cycles);
    @(negedge clk);
    key_in = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    cycles = 1;
    check(!ready, "key_ready drops on load");
    while (!ready && cycles < 50) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!ready, "not ready after reset");

    load(128'h2b7e151628aed2a6abf7158809cf4f3c, cyc);
    check(cyc == 11, $sformatf("expansion took %0d clocks, expected 11", cyc));
    check(ready_s, "standard schedule ready");
    check(rk_s[0] == 128'h2b7e151628aed2a6abf7158809cf4f3c, "rk0");
    check(rk_s[1] == 128'ha0fafe1788542cb123a339392a6c7605, $sformatf("FIPS rk1 %h", rk_s[1]));
    check(rk_s[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, $sformatf("FIPS rk10 %h", rk_s[10]));
    check(key7 == 8'hf7, "key7 is byte 9");

    // The key of the worked example: byte 9 is 6F.
    load(128'h1cf34612456e9136676f112387aafed0, cyc);
    check(key7 == 8'h6f, $sformatf("key7 = %02h, expected 6f", key7));

    for (int t = 0; t < 20; t++) begin
      logic [127:0] k;
      rk_t e;
      k = rand_blk();
      if (t == 5) begin
        // restart: load a first key, then a second one three clocks later
        @(negedge clk); key_in = rand_blk(); key_load = 1;
        @(negedge clk); key_load = 0;
        repeat (2) @(negedge clk);
      end
      load(k, cyc);
      check(cyc == 11, $sformatf("expansion took %0d clocks", cyc));
      e = expand(k, bget(k, 9), 1);
      for (int r = 0; r < 11; r++)
        check(rk[r] == e[r], $sformatf("key %h rk%0d %h exp %h", k, r, rk[r], e[r]));
      e = expand(k, 0, 0);
      check(rk_s[10] == e[10], "standard schedule rk10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
