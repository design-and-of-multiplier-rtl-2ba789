// tb_image_contrast: image-contrast workload on the default multiplier.
//
// A synthetic 512 x 512 RGB image (786432 8-bit pixels: smooth gradients
// plus noise, generated here) is processed pixel by pixel. Each pixel is
// mapped from 0..255 to a 16-bit value v = pixel * 257 (0..65535); the
// multiplier then forms F = v * 65535, whose upper half is v in the 0..1
// fixed-point scale, and the contrast curve C = (1 - cos(pi * F / 2^32)) / 2
// is applied and scaled back to 8 bits. The same is done with the exact
// product, and the peak signal-to-noise ratio of the approximate result
// against the exact one is computed. The pi / 2^32 scaling of the cosine
// argument is this testbench's choice. Checks: every product against the
// arithmetic model, the PSNR above 30 dB, and at least one product changed
// by the approximation (the product errors, below 2^18, are usually too
// small to change an 8-bit output pixel).
module tb_image_contrast;
  import tb_model_pkg::*;
  localparam int W = 512, H = 512, CH = 3;
  localparam real PI = 3.14159265358979;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0, model_fail = 0, changed = 0, inexact = 0;
  real mse = 0.0, psnr;

  mult16 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int contrast(longint unsigned f);
    real c;
    c = (1.0 - $cos(PI * real'(f) / 4294967296.0)) / 2.0;
    return int'(c * 255.0 + 0.5);
  endfunction

  initial begin
    int pix, ca, ce, d;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int c = 0; c < CH; c++) begin
          pix = ((x * (c + 1) + y * (3 - c)) / 4 + int'($urandom_range(0, 24))) % 256;
          a = 16'(pix * 257);
          b = 16'hffff;
          #1;
          if (p != mult_model(a, b, 1)) begin
            model_fail++;
            if (model_fail < 10) $display("FAIL %0d * 65535 = %0d, model %0d", a, p, mult_model(a, b, 1));
          end
          if (longint'(p) != longint'(a) * 65535) inexact++;
          ca = contrast(longint'(p));
          ce = contrast(longint'(a) * 65535);
          if (ca != ce) changed++;
          d = ca - ce;
          mse += real'(d * d);
        end
    checks++;
    if (model_fail != 0) failures++;
    mse = mse / real'(W * H * CH);
    psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
    checks++;
    if (psnr <= 30.0) begin
      failures++;
      $display("FAIL PSNR %0.2f dB", psnr);
    end
    checks++;
    if (inexact == 0) begin
      failures++;
      $display("FAIL the approximation never changed a product");
    end
    $display("pixels %0d, inexact products %0d, output pixels changed %0d, PSNR %0.2f dB (99 = identical)",
             W * H * CH, inexact, changed, psnr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
