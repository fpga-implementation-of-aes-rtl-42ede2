// tb_aes_dec_round: a decryption round and a final decryption round,
// compared with the reference model on random states, keys and S-box
// bytes: InvMix(InvSub(InvShift(s)) ^ k) for a full round and
// InvSub(InvShift(s)) ^ k for the final one, one clock after the input.
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0;
  logic [127:0] in_state, round_key;
  logic [7:0] key7;
  logic ov, ov_f;
  logic [127:0] os, os_f;

  aes_dec_round #(.FINAL(1'b0)) dut   (.clk, .rst_n, .in_valid, .in_state, .round_key, .key7,
                                       .out_valid(ov), .out_state(os));
  aes_dec_round #(.FINAL(1'b1)) dut_f (.clk, .rst_n, .in_valid, .in_state, .round_key, .key7,
                                       .out_valid(ov_f), .out_state(os_f));
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_state = '0; round_key = '0; key7 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [127:0] s, k, e, ef;
      logic v;
      s = rand_blk(); k = rand_blk();
      key7 = (i % 3 == 0) ? 8'h00 : 8'($urandom);
      v = 1'($urandom);
      in_state = s; round_key = k; in_valid = v;
      e  = inv_mix(inv_shift_sub(s, key7) ^ k);
      ef = inv_shift_sub(s, key7) ^ k;
      @(negedge clk);
      check(ov == v && ov_f == v, "valid one clock later");
      check(os == e,  $sformatf("dec round %h -> %h exp %h", s, os, e));
      check(os_f == ef, $sformatf("final dec %h -> %h exp %h", s, os_f, ef));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
