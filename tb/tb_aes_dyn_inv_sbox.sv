// tb_aes_dyn_inv_sbox: exhaustive check of the inverse dynamic S-box.
// For several key bytes every input is compared with the reference model,
// and the round trip through the forward dynamic S-box (also instantiated)
// must return the original byte.
module tb_aes_dyn_inv_sbox;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] din, key7, dout, fwd, back;
  aes_dyn_inv_sbox dut  (.din,       .key7, .dout);
  aes_dyn_sbox     u_fw (.din(din),  .key7, .dout(fwd));
  aes_dyn_inv_sbox u_bk (.din(fwd),  .key7, .dout(back));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u8 keys [6];
    keys = '{8'h00, 8'h23, 8'h6f, 8'hd7, 8'h80, 8'h00};
    keys[5] = u8'($urandom);
    foreach (keys[k]) begin
      for (int x = 0; x < 256; x++) begin
        din = 8'(x); key7 = keys[k]; #1;
        check(dout == inv_sbox(u8'(x), keys[k]),
              $sformatf("key7=%02h din=%02h dout=%02h exp=%02h", keys[k], x, dout, inv_sbox(u8'(x), keys[k])));
        check(back == 8'(x), $sformatf("round trip key7=%02h x=%02h", keys[k], x));
      end
    end
    // Standard inverse S-box spot values.
    key7 = 0; din = 8'h63; #1; check(dout == 8'h00, "InvS(63)=00");
    din = 8'h00; #1; check(dout == 8'h52, "InvS(00)=52");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
