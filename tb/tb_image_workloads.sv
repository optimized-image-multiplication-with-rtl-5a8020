// tb_image_workloads: image multiplication with the true and approximate
// multipliers, scored by PSNR and NED.
//
// Two synthetic test images per pixel width are generated in the testbench
// (smooth shading plus texture; SIZE x SIZE pixels). Two operations are run:
// image A x image B, and image A squared (contrast scaling). For each the
// double-width products are reduced to pixel range by keeping the upper W
// bits, and the approximate result is compared with the exact one:
//   PSNR = 10 log10((2^W-1)^2 / MSE) over the scaled pixels,
//   NED  = mean |approximate - exact| / (2^W-1)^2 over the full products.
// Configurations: 8x8 model-1 (Design-1 and Design-2, columns 5..9) and
// 16x16 model-2 (all columns) and model-3 (columns 0..15), each with
// Design-1 and Design-2. The exact multipliers must equal a*b on every
// pixel. The checks on the scores are the orderings reported for these
// models: for every operation model-3 beats model-2 in PSNR for each
// design variant, and Design-1 beats Design-2 in every model.
module tb_image_workloads;
  import cbc_pkg::*;
  localparam int SIZE = 64;
  localparam int NCFG = 6;

  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [15:0] p8x;
  logic [31:0] p16x;
  logic [31:0] pa [NCFG];      // approximate products, widened
  int checks = 0, failures = 0;
  real psnr_of [4][NCFG];      // [operation][configuration]

  cbc_multiplier #(.W(8),  .MODE(CBC_EXACT)) u8x  (.a(a8),  .b(b8),  .p(p8x));
  cbc_multiplier #(.W(16), .MODE(CBC_EXACT)) u16x (.a(a16), .b(b16), .p(p16x));

  logic [15:0] p8_m1d1, p8_m1d2;
  cbc_multiplier #(.W(8), .MODE(CBC_DESIGN1), .APX_LO(5), .APX_HI(9)) u_m1d1 (.a(a8), .b(b8), .p(p8_m1d1));
  cbc_multiplier #(.W(8), .MODE(CBC_DESIGN2), .APX_LO(5), .APX_HI(9)) u_m1d2 (.a(a8), .b(b8), .p(p8_m1d2));
  cbc_multiplier #(.W(16), .MODE(CBC_DESIGN1), .APX_LO(0), .APX_HI(31)) u_m2d1 (.a(a16), .b(b16), .p(pa[2]));
  cbc_multiplier #(.W(16), .MODE(CBC_DESIGN2), .APX_LO(0), .APX_HI(31)) u_m2d2 (.a(a16), .b(b16), .p(pa[3]));
  cbc_multiplier #(.W(16), .MODE(CBC_DESIGN1), .APX_LO(0), .APX_HI(15)) u_m3d1 (.a(a16), .b(b16), .p(pa[4]));
  cbc_multiplier #(.W(16), .MODE(CBC_DESIGN2), .APX_LO(0), .APX_HI(15)) u_m3d2 (.a(a16), .b(b16), .p(pa[5]));
  assign pa[0] = 32'(p8_m1d1);
  assign pa[1] = 32'(p8_m1d2);

  string cfg_name [NCFG] = '{"8x8 model-1 design-1", "8x8 model-1 design-2",
                             "16x16 model-2 design-1", "16x16 model-2 design-2",
                             "16x16 model-3 design-1", "16x16 model-3 design-2"};

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Synthetic image, values in [0, 1].
  function automatic real pixel(int img, int x, int y);
    real v;
    if (img == 0)
      v = 0.5 + 0.35 * $sin(x * 0.11) * $cos(y * 0.07) + 0.12 * $sin((x + 2 * y) * 0.6);
    else
      v = 0.15 + 0.7 * (x + y) / (2.0 * SIZE) + 0.1 * $cos($sqrt(real'((x - 20) * (x - 20) + (y - 30) * (y - 30))) * 0.5);
    if (v < 0.0) v = 0.0;
    if (v > 1.0) v = 1.0;
    return v;
  endfunction

  task automatic run(input string op, input int opi, input int wsel, input bit square);
    real se [NCFG];
    real ed [NCFG];
    real maxp, maxs, psnr, ned;
    longint unsigned ex, ap;
    int w, c0, c1;
    w  = (wsel == 0) ? 8 : 16;
    c0 = (wsel == 0) ? 0 : 2;
    c1 = (wsel == 0) ? 1 : 5;
    maxs = real'((64'd1 << w) - 1);
    maxp = maxs * maxs;
    for (int c = 0; c < NCFG; c++) begin se[c] = 0.0; ed[c] = 0.0; end
    for (int y = 0; y < SIZE; y++) begin
      for (int x = 0; x < SIZE; x++) begin
        a8  = 8'($rtoi(pixel(0, x, y) * 255.0));
        b8  = square ? a8 : 8'($rtoi(pixel(1, x, y) * 255.0));
        a16 = 16'($rtoi(pixel(0, x, y) * 65535.0));
        b16 = square ? a16 : 16'($rtoi(pixel(1, x, y) * 65535.0));
        #1;
        ex = (wsel == 0) ? longint'(p8x) : longint'(p16x);
        checks++;
        if ((wsel == 0 && longint'(p8x) != longint'(a8) * longint'(b8)) ||
            (wsel == 1 && longint'(p16x) != longint'(a16) * longint'(b16))) begin
          failures++;
          $display("FAIL exact product at (%0d,%0d)", x, y);
        end
        for (int c = c0; c <= c1; c++) begin
          real d;
          ap = longint'(pa[c]);
          d  = real'(longint'(ap >> w)) - real'(longint'(ex >> w));
          se[c] += d * d;
          ed[c] += (ap > ex) ? real'(ap - ex) : real'(ex - ap);
        end
      end
    end
    for (int c = c0; c <= c1; c++) begin
      real mse;
      mse  = se[c] / (SIZE * SIZE);
      psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(maxs * maxs / mse);
      ned  = ed[c] / (SIZE * SIZE) / maxp;
      $display("%-10s %-24s PSNR %6.2f dB  NED %e", op, cfg_name[c], psnr, ned);
      psnr_of[opi][c] = psnr;
    end
  endtask

  task automatic order(input int op, input int better, input int worse, input string what);
    checks++;
    if (!(psnr_of[op][better] > psnr_of[op][worse])) begin
      failures++;
      $display("FAIL ordering %s (operation %0d): %f vs %f", what, op,
               psnr_of[op][better], psnr_of[op][worse]);
    end
  endtask

  initial begin
    run("A x B", 0, 0, 1'b0);
    run("A^2",   1, 0, 1'b1);
    run("A x B", 2, 1, 1'b0);
    run("A^2",   3, 1, 1'b1);
    for (int op = 0; op < 4; op++) begin
      if (op < 2) order(op, 0, 1, "8x8 design-1 over design-2");
      else begin
        order(op, 4, 2, "model-3 over model-2, design-1");
        order(op, 5, 3, "model-3 over model-2, design-2");
        order(op, 2, 3, "model-2 design-1 over design-2");
        order(op, 4, 5, "model-3 design-1 over design-2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
