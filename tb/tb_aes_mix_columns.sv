// tb_aes_mix_columns: MixColumns and InvMixColumns against the reference
// model, a textbook column (db 13 53 45 -> 8e 4d a1 bc), and the round
// trip InvMixColumns(MixColumns(x)) = x on random states.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] din, fwd, inv, back;
  aes_mix_columns #(.INVERSE(1'b0)) dut   (.din,        .dout(fwd));
  aes_mix_columns #(.INVERSE(1'b1)) dut_i (.din,        .dout(inv));
  aes_mix_columns #(.INVERSE(1'b1)) u_bk  (.din(fwd),   .dout(back));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6; #1;
    check(fwd == 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, $sformatf("known columns %h", fwd));
    check(back == din, "known round trip");
    for (int i = 0; i < 500; i++) begin
      din = rand_blk(); #1;
      check(fwd == mix(din), $sformatf("mix %h -> %h", din, fwd));
      check(inv == inv_mix(din), $sformatf("inv_mix %h -> %h", din, inv));
      check(back == din, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
