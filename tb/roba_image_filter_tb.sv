// roba_image_filter_tb: image smoothing and sharpening through proposed_mul.
//
// The two image-processing uses of the RoBA multiplier, run on a generated
// 32x32 8-bit grey-scale image (gradients, a bright square and pseudo-random
// noise). Every pixel-by-weight product of both filters goes through the
// default-size proposed_mul, one product per clock; the sums, the division and
// the clamping to 0..255 are exact.
//   smoothing:  5x5 Gaussian kernel, weights 1 4 7 4 1 / 4 16 26 16 4 /
//               7 26 41 26 7 / ..., divided by 273;
//   sharpening: 2*X - smoothing(X), i.e. the kernel 546*delta - G, over 273,
//               so the weights are negative except the centre (505).
// Kernel and image are this testbench's own choices. The 2-pixel border is
// left unfiltered.
//
// Checks: each S-RoBA product (c) and AS-RoBA product (c_as) against the
// reference model, and the one-cycle latency. Reported, not checked: the PSNR
// of each filtered image against the same filter with exact products, for
// S-RoBA and AS-RoBA.
module roba_image_filter_tb;
  import roba_ref_pkg::*;

  localparam int W = 32;
  localparam int H = 32;
  localparam int N = 32;

  int checks = 0, failures = 0;
  int products = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0]   a = '0, b = '0;
  logic [2*N-1:0] c, c_as, c_u;

  proposed_mul dut (.clk(clk), .a(a), .b(b), .c(c), .c_as(c_as), .c_u(c_u));

  int img [H][W];
  int gk [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                    '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};

  // One product through the multiplier: apply, wait one edge, read.
  task automatic mul(input int x, input int y, output longint ps, output longint pas);
    logic [127:0] es, eas;
    @(negedge clk);
    a = N'(x);
    b = N'(y);
    @(posedge clk);
    #1;
    es  = ref_roba(64'(a), 64'(b), N, REF_S);
    eas = ref_roba(64'(a), 64'(b), N, REF_AS);
    checks += 2;
    if (c !== es[63:0] || c_as !== eas[63:0]) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0d x %0d: c=%0d exp %0d, c_as=%0d exp %0d", x, y, $signed(c),
                 $signed(es[63:0]), $signed(c_as), $signed(eas[63:0]));
    end
    ps  = longint'($signed(c));
    pas = longint'($signed(c_as));
    products++;
  endtask

  function automatic int clamp(input longint s);
    longint q;
    // Division by 273 rounding to nearest, for either sign.
    q = (s >= 0) ? (s + 136) / 273 : -((-s + 136) / 273);
    if (q < 0) return 0;
    if (q > 255) return 255;
    return int'(q);
  endfunction

  // Runs one filter; sharpen selects the kernel. Returns squared error sums.
  task automatic run_filter(input bit sharpen, output real se_s, output real se_as);
    se_s = 0.0;
    se_as = 0.0;
    for (int y = 2; y < H - 2; y++) begin
      for (int x = 2; x < W - 2; x++) begin
        longint acc_e, acc_s, acc_as, ps, pas;
        int oe, os, oas;
        acc_e = 0; acc_s = 0; acc_as = 0;
        for (int j = 0; j < 5; j++) begin
          for (int i = 0; i < 5; i++) begin
            int wgt;
            wgt = sharpen ? (((i == 2 && j == 2) ? 546 : 0) - gk[j][i]) : gk[j][i];
            mul(img[y+j-2][x+i-2], wgt, ps, pas);
            acc_e  += longint'(img[y+j-2][x+i-2]) * longint'(wgt);
            acc_s  += ps;
            acc_as += pas;
          end
        end
        oe  = clamp(acc_e);
        os  = clamp(acc_s);
        oas = clamp(acc_as);
        se_s  += real'((os - oe) * (os - oe));
        se_as += real'((oas - oe) * (oas - oe));
      end
    end
  endtask

  function automatic real psnr(input real se);
    real mse;
    mse = se / real'((W - 4) * (H - 4));
    if (mse == 0.0) return 999.0;
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    real se_s, se_as;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 4 * x + 2 * y + int'($urandom % 24);
        if (x >= 10 && x < 22 && y >= 10 && y < 22) v += 90;
        img[y][x] = (v > 255) ? 255 : v;
      end

    run_filter(1'b0, se_s, se_as);
    $display("smoothing:  PSNR against exact products: S-RoBA %0.2f dB, AS-RoBA %0.2f dB",
             psnr(se_s), psnr(se_as));
    run_filter(1'b1, se_s, se_as);
    $display("sharpening: PSNR against exact products: S-RoBA %0.2f dB, AS-RoBA %0.2f dB",
             psnr(se_s), psnr(se_as));
    $display("%0d products through the multiplier", products);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
