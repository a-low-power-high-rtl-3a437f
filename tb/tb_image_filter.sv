// tb_image_filter: image-processing workload for the 16 x 16 multiplier.
//
// A 64 x 64 synthetic 8-bit grey image (smooth gradients plus a sharp-edged
// checker pattern, generated by formula) is blurred with a 3 x 3 Gaussian
// kernel (sigma = 1) in Q12 fixed point: corner 308, edge 507 and centre 836
// out of 4096 (the weights add up to exactly 4096). Each output pixel is the sum of nine pixel x coefficient products shifted
// right by 12. Every product goes through the multiplier. The filter is run
// with the low m bits of the mask cleared, m = 0, 4, 8, 10, 12, 16, and each
// result is compared with an exactly computed image.
// Checks: m = 0 reproduces the exact image; the mean squared error never
// decreases as m grows; light masking (m <= 8) stays above 40 dB PSNR; and the
// heaviest setting does show a visible error. Products here stay below 2^18,
// so masking beyond bit 17 would change nothing. The PSNR of every setting is
// printed, which is the "accuracy can be dialled per program phase" behaviour
// the multiplier is built for.
module tb_image_filter;
  localparam int IMG = 64;
  localparam int NM  = 6;
  localparam int MASKS [NM] = '{0, 4, 8, 10, 12, 16};

  logic [15:0] a, b;
  logic [31:0] mask_x, product;
  int checks = 0, failures = 0;

  wallacetreecsma16 dut (.a(a), .b(b), .mask_x(mask_x), .product(product));

  function automatic int pixel(input int x, input int y);
    int v;
    v = (x * 3 + y * 2) % 200;
    if (((x / 8) + (y / 8)) % 2 == 1) v += 55;
    return v;
  endfunction

  function automatic int coef(input int dx, input int dy);
    if (dx == 0 && dy == 0) return 836;
    if (dx == 0 || dy == 0) return 507;
    return 308;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mse [NM];
    real psnr;
    for (int k = 0; k < NM; k++) begin
      longint unsigned sq_err;
      mask_x = 32'hffff_ffff << MASKS[k];
      sq_err = 0;
      for (int y = 1; y < IMG - 1; y++) begin
        for (int x = 1; x < IMG - 1; x++) begin
          longint unsigned acc_hw, acc_ref;
          int out_hw, out_ref, d;
          acc_hw = 0;
          acc_ref = 0;
          for (int dy = -1; dy <= 1; dy++) begin
            for (int dx = -1; dx <= 1; dx++) begin
              a = 16'(pixel(x + dx, y + dy));
              b = 16'(coef(dx, dy));
              #1;
              acc_hw  += product;
              acc_ref += longint'(pixel(x + dx, y + dy)) * longint'(coef(dx, dy));
            end
          end
          out_hw  = int'(acc_hw >> 12);
          out_ref = int'(acc_ref >> 12);
          d = out_hw - out_ref;
          sq_err += longint'(d * d);
        end
      end
      mse[k] = real'(sq_err) / real'((IMG - 2) * (IMG - 2));
      if (mse[k] == 0.0) begin
        $display("mask low %2d bits: MSE 0, exact", MASKS[k]);
      end else begin
        psnr = 10.0 * $log10(255.0 * 255.0 / mse[k]);
        $display("mask low %2d bits: MSE %f, PSNR %f dB", MASKS[k], mse[k], psnr);
        if (MASKS[k] <= 8) check(psnr > 40.0, "PSNR above 40 dB with light masking");
      end
    end
    check(mse[0] == 0.0, "exact image with no masked bits");
    for (int k = 1; k < NM; k++) check(mse[k] >= mse[k-1], "error grows with mask length");
    check(mse[NM-1] > 0.0, "heavy masking changes the image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_image_filter
