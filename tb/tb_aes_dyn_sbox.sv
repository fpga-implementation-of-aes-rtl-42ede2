// tb_aes_dyn_sbox: exhaustive check of the dynamic S-box byte (and of the
// S-box table computed in aes_pkg).
// For key7 in {00, 23, 6F, D7} and random values, every input is compared
// with the reference model. The worked example 63 ^ 6F = 0C and the first
// row of the S-box generated with key byte 6F are checked against their
// printed values, and each dynamic S-box is checked to be a permutation.
module tb_aes_dyn_sbox;
  import aes_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] din, key7, dout;
  aes_dyn_sbox dut (.din, .key7, .dout);

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

  // Row 0x00 of the standard S-box and of the S-box for key byte 6F.
  localparam logic [127:0] AES_ROW0 = 128'h637c777bf26b6fc53001672bfed7ab76;
  localparam logic [127:0] DYN_ROW0 = 128'h0c1318149d0400aa5f6e084491b8c419;

  initial begin
    u8 keys [8];
    keys = '{8'h00, 8'h23, 8'h6f, 8'hd7, 8'h01, 8'h80, 8'hff, 8'h5a};
    keys[7] = u8'($urandom);
    foreach (keys[k]) begin
      bit seen [256];
      foreach (seen[i]) seen[i] = 0;
      for (int x = 0; x < 256; x++) begin
        din = 8'(x); key7 = keys[k]; #1;
        check(dout == sbox(u8'(x), keys[k]),
              $sformatf("key7=%02h din=%02h dout=%02h exp=%02h", keys[k], x, dout, sbox(u8'(x), keys[k])));
        seen[dout] = 1;
      end
      begin
        int n;
        n = 0;
        foreach (seen[i]) n += seen[i];
        check(n == 256, $sformatf("key7=%02h not bijective (%0d values)", keys[k], n));
      end
    end
    for (int x = 0; x < 16; x++) begin
      din = 8'(x); key7 = 8'h00; #1;
      check(dout == AES_ROW0[127-8*x -: 8], $sformatf("AES S-box[%0d]", x));
      key7 = 8'h6f; #1;
      check(dout == DYN_ROW0[127-8*x -: 8], $sformatf("dynamic S-box 6F [%0d]=%02h", x, dout));
    end
    din = 8'h00; key7 = 8'h6f; #1;
    check(dout == 8'h0c, "63 ^ 6F = 0C");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
