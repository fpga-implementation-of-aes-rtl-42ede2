// tb_sbox_properties: cryptographic properties of the dynamic S-boxes.
// The 256 entries of each S-box are read out of aes_dyn_sbox for the
// standard S-box (key byte 00) and the key bytes 23, 6F and D7, and for
// each one the testbench computes
//  * bijectivity (all 256 outputs distinct);
//  * nonlinearity NL = 128 - max|W(a,b)|/2 over input masks a and nonzero
//    output masks b, W(a,b) = sum_x (-1)^(b.S(x) ^ a.x); expected 112;
//  * the average strict-avalanche value: the fraction of output bits that
//    flip when one input bit flips, over all x, input and output bits;
//    expected within 1 % of 0.5.
// XORing a constant onto every output does not change output differences,
// so every dynamic S-box must also give exactly the standard S-box's SAC.
module tb_sbox_properties;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] keys [4];
    logic [7:0] s [256];
    real sac_aes;
    keys = '{8'h00, 8'h23, 8'h6f, 8'hd7};
    sac_aes = 0.0;
    foreach (keys[k]) begin
      int maxw, nl, n_distinct, flips;
      bit seen [256];
      real sac;
      for (int x = 0; x < 256; x++) begin
        din = 8'(x); key7 = keys[k]; #1;
        s[x] = dout;
      end
      foreach (seen[i]) seen[i] = 0;
      foreach (s[x]) seen[s[x]] = 1;
      n_distinct = 0;
      foreach (seen[i]) n_distinct += int'(seen[i]);
      maxw = 0;
      for (int b = 1; b < 256; b++)
        for (int a = 0; a < 256; a++) begin
          int w;
          w = 0;
          for (int x = 0; x < 256; x++)
            w += (^((8'(b) & s[x]) ^ (8'(a) & 8'(x)))) ? -1 : 1;
          if (w < 0) w = -w;
          if (w > maxw) maxw = w;
        end
      nl = 128 - maxw / 2;
      flips = 0;
      for (int x = 0; x < 256; x++)
        for (int i = 0; i < 8; i++)
          flips += $countones(s[x] ^ s[x ^ (1 << i)]);
      sac = real'(flips) / (256.0 * 8.0 * 8.0);
      if (k == 0) sac_aes = sac;
      $display("S-box key byte %02h: bijective=%0d NL=%0d avg SAC=%0.4f", keys[k], n_distinct == 256, nl, sac);
      check(n_distinct == 256, $sformatf("%02h: %0d distinct outputs", keys[k], n_distinct));
      check(nl == 112, $sformatf("%02h: nonlinearity %0d", keys[k], nl));
      check(sac > 0.495 && sac < 0.505, $sformatf("%02h: SAC %0.4f", keys[k], sac));
      check(sac == sac_aes, $sformatf("%02h: SAC differs from the standard S-box", keys[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
