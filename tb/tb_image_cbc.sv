// tb_image_cbc: image workload on the full design at its default
// parameters. Three generated 256x256 8-bit grayscale test images
// (65536 bytes = 4096 blocks each: a smooth gradient, a flat background
// with a dark object, and a ring pattern) are encrypted in CBC mode, each
// with a key whose S-box byte (byte 9) is 23, 6F or D7, then decrypted.
// Checks:
//  * every ciphertext block against the reference model;
//  * decryption returns the image exactly;
//  * Hamming distance between plain and encrypted image within 50 +/- 1 %;
//  * chi-square of the encrypted image histogram below the 5 % critical
//    value for 255 degrees of freedom, 293.24;
//  * key sensitivity: the image is encrypted again N_SENS = 100 times, each
//    time with one random key bit flipped; every such ciphertext differs
//    from the first in 50 +/- 1 % of its bits, and the mean is within
//    0.5 %. The chi-square of these 100 encryptions is below 293.24 in at
//    least 85 of them (a uniform source stays below it 95 % of the time).
// It also reports clocks per block for CBC encryption (12) and CBC
// decryption (1).
module tb_image_cbc;
  import aes_ref_pkg::*;
  localparam int NB = 4096;            // blocks per image
  localparam int N_SENS = 100;         // flipped-key runs per image

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
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [127:0] img [NB], ibuf [NB], obuf [NB], c1 [NB];
  int ocount = 0;
  always @(negedge clk) if (rst_n && out_valid && ocount < NB) begin
    obuf[ocount] = out_block;
    ocount++;
  end

  function automatic logic [7:0] pixel(int im, int y, int x);
    int dx, dy;
    case (im)
      0: return 8'((x + y) / 2);
      1: return (x > 90 && x < 170 && y > 110 && y < 140) ? 8'd40 : 8'(200 + (y / 64));
      default: begin
        dx = x - 128; dy = y - 128;
        return 8'(((dx*dx + dy*dy) / 64) % 2 == 0 ? 220 : 30);
      end
    endcase
  endfunction

  // Run one image-sized stream through the design; returns clocks used.
  task automatic run(logic [127:0] k, logic [127:0] v, logic dec, output longint clocks);
    longint t0;
    @(negedge clk);
    key = k; key_load = 1; iv = v;
    @(negedge clk);
    key_load = 0;
    while (!key_ready) @(negedge clk);
    iv_load = 1;
    @(negedge clk);
    iv_load = 0;
    ocount = 0;
    t0 = cyc;
    for (int i = 0; i < NB; i++) begin
      in_block = ibuf[i]; decrypt = dec; in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 0;
    while (ocount < NB) @(negedge clk);
    clocks = cyc - t0;
  endtask

  function automatic real hd(int unused);
    longint d = 0;
    for (int i = 0; i < NB; i++) d += $countones(obuf[i] ^ c1[i]);
    return real'(d) / real'(NB * 128);
  endfunction

  initial begin
    logic [7:0] kbytes [3];
    logic [127:0] k, v, chain, e;
    longint clk_enc, clk_dec, clk_x;
    int bad;
    real h, chi;
    int hist [256];
    kbytes = '{8'h23, 8'h6f, 8'hd7};
    key = '0; iv = '0; in_block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int im = 0; im < 3; im++) begin
      for (int b = 0; b < NB; b++)
        for (int j = 0; j < 16; j++)
          img[b][127-8*j -: 8] = pixel(im, (16*b + j) / 256, (16*b + j) % 256);
      k = rand_blk();
      k[127-8*9 -: 8] = kbytes[im];
      v = rand_blk();

      // Encrypt.
      ibuf = img;
      run(k, v, 1'b0, clk_enc);
      c1 = obuf;
      begin
        rk_t rk;
        rk = expand(k, kbytes[im], 1);
        chain = v; bad = 0;
        for (int b = 0; b < NB; b++) begin
          e = enc_rk(img[b] ^ chain, rk, kbytes[im]);
          if (c1[b] != e) bad++;
          chain = e;
        end
      end
      check(bad == 0, $sformatf("image %0d: %0d ciphertext blocks differ from the model", im, bad));
      check(clk_enc >= 12 * NB && clk_enc <= 12 * NB + 16,
            $sformatf("image %0d: CBC encryption took %0d clocks", im, clk_enc));

      // Hamming distance plain vs cipher (obuf = cipher, c1 reused as plain).
      c1 = img;
      h = hd(0);
      c1 = obuf;
      check(h > 0.49 && h < 0.51, $sformatf("image %0d: HD plain/cipher %0.4f", im, h));

      // Chi-square of the cipher image.
      foreach (hist[i]) hist[i] = 0;
      for (int b = 0; b < NB; b++)
        for (int j = 0; j < 16; j++) hist[c1[b][127-8*j -: 8]]++;
      chi = 0.0;
      foreach (hist[i]) chi += (real'(hist[i]) - 256.0) ** 2 / 256.0;
      check(chi < 293.24, $sformatf("image %0d: chi-square %0.2f", im, chi));

      // Decrypt back to back.
      ibuf = c1;
      run(k, v, 1'b1, clk_dec);
      bad = 0;
      for (int b = 0; b < NB; b++) if (obuf[b] != img[b]) bad++;
      check(bad == 0, $sformatf("image %0d: %0d blocks not restored", im, bad));
      check(clk_dec <= NB + 16, $sformatf("image %0d: CBC decryption took %0d clocks", im, clk_dec));
      $display("image %0d key byte %02h: HD plain/cipher %0.4f chi2 %0.2f enc %0d clk (%0.2f/block) dec %0d clk (%0.2f/block)",
               im, kbytes[im], h, chi, clk_enc, real'(clk_enc) / NB, clk_dec, real'(clk_dec) / NB);

      // Key sensitivity: flip one key bit, encrypt the same image again.
      ibuf = img;
      begin
        real h_sum, h_min, h_max, chi_sum;
        int  n_chi_ok;
        h_sum = 0.0; h_min = 1.0; h_max = 0.0; chi_sum = 0.0; n_chi_ok = 0;
        for (int s = 0; s < N_SENS; s++) begin
          logic [127:0] k2;
          k2 = k;
          k2[$urandom_range(0, 127)] ^= 1'b1;
          run(k2, v, 1'b0, clk_x);
          h = hd(0);
          h_sum += h;
          if (h < h_min) h_min = h;
          if (h > h_max) h_max = h;
          check(h > 0.49 && h < 0.51, $sformatf("image %0d: key sensitivity HD %0.4f", im, h));
          foreach (hist[i]) hist[i] = 0;
          for (int b = 0; b < NB; b++)
            for (int j = 0; j < 16; j++) hist[obuf[b][127-8*j -: 8]]++;
          chi = 0.0;
          foreach (hist[i]) chi += (real'(hist[i]) - 256.0) ** 2 / 256.0;
          chi_sum += chi;
          if (chi < 293.24) n_chi_ok++;
        end
        $display("image %0d: %0d one-bit key changes: HD mean %0.6f min %0.4f max %0.4f; chi2 mean %0.2f, %0d below 293.24",
                 im, N_SENS, h_sum / N_SENS, h_min, h_max, chi_sum / N_SENS, n_chi_ok);
        check(h_sum / N_SENS > 0.495 && h_sum / N_SENS < 0.505, "mean key sensitivity HD");
        check(n_chi_ok >= (N_SENS * 85) / 100, $sformatf("image %0d: only %0d chi-square values below 293.24", im, n_chi_ok));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
