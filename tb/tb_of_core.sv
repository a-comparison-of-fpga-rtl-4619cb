// Testbench for of_core on a 40x32 synthetic texture (sinusoids of 4 to 6
// pixel period in several orientations, including horizontal stripes)
// moving by (VX, VY) = (0.75, -0.5) pixel per frame: frame t-1 is I(x + VX, y + VY), frame t is I(x, y) and
// frame t+1 is I(x - VX, y - VY), sampled from the analytic texture, so the
// flow is (12, -8) in 1/16 pixel.  Checks: one output per pixel of the image;
// on the interior (8 pixels from the border) at least 90 % of the flows
// valid and within 4/16 pixel in both components; latency: the result for
// (x, y) leaves 17 clocks after the Gabor output, i.e. 21 clocks (+1 for
// sampling) after the input of (x+5, y+5), the pixel that completes its
// 11x11 window.
module tb_of_core;
  import vision_pkg::*;
  localparam int W = 40, H = 32, M = 6;
  localparam real VX = 0.75, VY = -0.5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [CRD_W-1:0] img_w = W, img_h = H, in_x = 0, in_y = 0, out_x, out_y;
  logic in_valid = 0, out_valid, out_inside;
  logic [7:0] pix [3];
  est_ok_t vx, vy;
  of_core #(.LBW(64)) dut (.*);

  function automatic logic [7:0] tex(real x, real y);
    real v;
    v = 128.0 + 30.0 * $sin(2.0 * 3.14159265 * x / 4.3 + 0.4)
              + 30.0 * $sin(2.0 * 3.14159265 * y / 4.6 + 2.0)
              + 20.0 * $sin(2.0 * 3.14159265 * (x + 0.5 * y) / 5.1 + 1.1)
              + 20.0 * $sin(2.0 * 3.14159265 * (x - 0.7 * y) / 5.7);
    return 8'(int'(v));
  endfunction

  int t_in [H + M][W + M];
  int n_in = 0, good = 0, tot = 0;

  initial begin
    foreach (pix[f]) pix[f] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H + M; y++)
      for (int x = 0; x < W + M; x++) begin
        in_valid <= 1; in_x <= 16'(x); in_y <= 16'(y);
        for (int f = 0; f < 3; f++)
          pix[f] <= (x < W && y < H) ? tex(x - VX * (f - 1), y - VY * (f - 1)) : 8'd0;
        t_in[y][x] = cyc;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (80) @(posedge clk);
    checks += 2;
    if (n_in != W * H) begin failures++; $display("outputs %0d", n_in); end
    if (good < tot * 9 / 10) begin failures++; end
    $display("flow within 4/16 px at %0d of %0d pixels", good, tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_inside) begin
    int x, y;
    x = int'(out_x); y = int'(out_y);
    n_in++;
    if (x >= 8 && x < W - 8 && y >= 8 && y < H - 8) begin
      tot++;
      if (vx.ok && vy.ok && int'(vx.v) - 12 <= 4 && int'(vx.v) - 12 >= -4
          && int'(vy.v) + 8 <= 4 && int'(vy.v) + 8 >= -4) good++;
    end
    if (x == 10 && y == 10) begin
      checks++;
      if (cyc - t_in[y + 5][x + 5] != 21 + 1) begin failures++; $display("latency %0d", cyc - t_in[y + 5][x + 5]); end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
