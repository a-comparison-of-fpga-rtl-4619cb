// Testbench for stereo_core on a 40x32 synthetic texture (sinusoids of 4 to
// 6 pixel period in several orientations).  The right image is the left one
// shifted by DSH = 0.75 pixel (R(x) = L(x + DSH), sampled from the analytic
// texture), so the disparity x_right - x_left is -12 in 1/16 pixel.  Checks:
// one output per pixel of the image; on the interior (8 pixels from the
// border) at least 90 % of the disparities valid and within 4/16 pixel of
// -12, and non-zero energy; latency: the result for (x, y) leaves 30 clocks
// after the Gabor output, i.e. 34 clocks (+1 for sampling) after the input of
// (x+5, y+5), the pixel that completes its 11x11 window.
module tb_stereo_core;
  import vision_pkg::*;
  localparam int W = 40, H = 32, M = 6;
  localparam real DSH = 0.75;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [CRD_W-1:0] img_w = W, img_h = H, in_x = 0, in_y = 0, out_x, out_y;
  logic in_valid = 0, out_valid, out_inside;
  logic [7:0] pix_l = 0, pix_r = 0;
  est_ok_t disp;
  feat_t feat;
  stereo_core #(.LBW(64)) dut (.*);

  function automatic logic [7:0] tex(real x, real y);
    real v;
    v = 128.0 + 35.0 * $sin(2.0 * 3.14159265 * x / 4.3 + 0.4)
              + 30.0 * $sin(2.0 * 3.14159265 * (x + 0.5 * y) / 5.1 + 1.1)
              + 25.0 * $sin(2.0 * 3.14159265 * (x - 0.7 * y) / 5.7);
    return 8'(int'(v));
  endfunction

  int t_in [H + M][W + M];
  int n_in = 0, good = 0, tot = 0, e_nz = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H + M; y++)
      for (int x = 0; x < W + M; x++) begin
        in_valid <= 1; in_x <= 16'(x); in_y <= 16'(y);
        pix_l <= (x < W && y < H) ? tex(x, y) : 8'd0;
        pix_r <= (x < W && y < H) ? tex(x + DSH, y) : 8'd0;
        t_in[y][x] = cyc;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (80) @(posedge clk);
    checks += 3;
    if (n_in != W * H) begin failures++; $display("outputs %0d", n_in); end
    if (good < tot * 9 / 10) begin failures++; end
    if (e_nz < tot) begin failures++; $display("energy zero at %0d pixels", tot - e_nz); end
    $display("disparity within 4/16 px at %0d of %0d pixels", good, tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_inside) begin
    int x, y;
    x = int'(out_x); y = int'(out_y);
    n_in++;
    if (x >= 8 && x < W - 8 && y >= 8 && y < H - 8) begin
      tot++;
      if (disp.ok && int'(disp.v) + 12 <= 4 && int'(disp.v) + 12 >= -4) good++;
      if (feat.energy != 0) e_nz++;
    end
    if (x == 10 && y == 10) begin
      checks++;
      if (cyc - t_in[y + 5][x + 5] != 34 + 1) begin failures++; $display("latency %0d", cyc - t_in[y + 5][x + 5]); end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
