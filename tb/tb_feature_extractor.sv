// tb_feature_extractor: self-checking test of the gradient feature extractor.
//
// Feeds blank, striped and random 16x16 binary images and compares each of
// the 64 features with a model in the testbench: Sobel sums over each 2x2
// cidx computed directly from the formulas, then arctan(sum Sy / sum Sx) in
// real arithmetic, coded as 16384 + theta * 65536 / 360 (+-90 degrees for
// sum Sx = 0, 16384 for a zero gradient). The CORDIC result must be within
// 4 codes (0.022 degrees). Also checks raster order of the outputs and the
// 18-cycle-per-cidx timing (1152 cycles per image).
module tb_feature_extractor;
  import am_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #500 clk = ~clk;

  logic         start, busy, f_valid, done;
  logic [255:0] img;
  logic [5:0]   f_dim;
  logic [15:0]  f_data;

  feature_extractor dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int px(input logic [255:0] im, input int r, input int c);
    if (r < 0 || c < 0 || r > 15 || c > 15) return 0;
    return int'(im[r*16 + c]);
  endfunction

  function automatic real expected(input logic [255:0] im, input int cidx);
    int gx = 0, gy = 0;
    real th;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        int i = 2 * (cidx / 8) + a;
        int j = 2 * (cidx % 8) + b;
        gx += px(im, i-1, j+1) + 2*px(im, i, j+1) + px(im, i+1, j+1)
            - px(im, i-1, j-1) - 2*px(im, i, j-1) - px(im, i+1, j-1);
        gy += px(im, i-1, j-1) + 2*px(im, i-1, j) + px(im, i-1, j+1)
            - px(im, i+1, j-1) - 2*px(im, i+1, j) - px(im, i+1, j+1);
      end
    if (gx == 0 && gy == 0) return 16384.0;
    if (gx == 0) th = (gy > 0) ? 90.0 : -90.0;
    else th = $atan(real'(gy) / real'(gx)) * 180.0 / 3.14159265358979;
    return 16384.0 + th * 65536.0 / 360.0;
  endfunction

  task automatic run_image(input logic [255:0] im, input string tag);
    int n = 0, cyc = 0;
    @(negedge clk);
    img = im; start = 1;
    @(negedge clk);
    start = 0;
    while (n < 64 && cyc < 5000) begin
      if (f_valid) begin
        real e = expected(im, n);
        real g = real'(f_data);
        check(f_dim == 6'(n), $sformatf("%s order %0d", tag, n));
        check(g - e < 4.0 && e - g < 4.0, $sformatf("%s cidx %0d got %0d exp %f", tag, n, f_data, e));
        if (n == 63) check(done == 1'b1, $sformatf("%s done with last", tag));
        n++;
      end
      @(negedge clk); cyc++;
    end
    check(n == 64, $sformatf("%s all features", tag));
    check(cyc == 64 * 20, $sformatf("%s cycles %0d", tag, cyc));
    check(!busy, $sformatf("%s idle after", tag));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] im;
    start = 0; img = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run_image('0, "blank");
    im = '0;
    for (int r = 0; r < 16; r++) for (int c = 4; c < 9; c++) im[r*16 + c] = 1'b1;
    run_image(im, "vbar");
    im = '0;
    for (int r = 3; r < 7; r++) for (int c = 0; c < 16; c++) im[r*16 + c] = 1'b1;
    run_image(im, "hbar");
    im = '0;
    for (int r = 0; r < 16; r++) for (int c = 0; c <= r; c++) im[r*16 + c] = 1'b1;
    run_image(im, "diag");
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < 8; k++) im[k*32 +: 32] = $urandom;
      run_image(im, $sformatf("rand%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
