// Testbench for pyramid_reduce: a random 18x12 image is streamed over the
// extended raster (two extra columns and rows).  Each output pixel (X, Y)
// must equal the 5x5 binomial average around (2X, 2Y) (samples outside the
// image count as zero), rounded; all 9x6 outputs must appear, in raster
// order, 2 clocks (+1 for sampling) after the input of (2X+2, 2Y+2).
module tb_pyramid_reduce;
  import vision_pkg::*;
  localparam int W = 18, H = 12, M = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [CRD_W-1:0] img_w = W, img_h = H, in_x = 0, in_y = 0, out_x, out_y;
  logic in_valid = 0, out_valid;
  logic [7:0] in_pix = 0, out_pix;
  pyramid_reduce #(.LBW(32)) dut (.*);

  int im [H][W];
  int t_in [H + M][W + M];
  int n_out = 0;
  localparam int BW [5] = '{1, 4, 6, 4, 1};

  initial begin
    foreach (im[y, x]) im[y][x] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H + M; y++)
      for (int x = 0; x < W + M; x++) begin
        in_valid <= 1; in_x <= 16'(x); in_y <= 16'(y);
        in_pix <= (x < W && y < H) ? 8'(im[y][x]) : 8'd0;
        t_in[y][x] = cyc;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != (W / 2) * (H / 2)) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    int acc, e, X, Y;
    X = int'(out_x); Y = int'(out_y);
    acc = 0;
    for (int r = -2; r <= 2; r++)
      for (int c = -2; c <= 2; c++)
        if (2 * Y + r >= 0 && 2 * Y + r < H && 2 * X + c >= 0 && 2 * X + c < W)
          acc += im[2 * Y + r][2 * X + c] * BW[r + 2] * BW[c + 2];
    e = (acc + 128) / 256;
    checks += 3;
    if (int'(out_pix) != e) begin failures++; if (failures < 5) $display("(%0d,%0d) %0d exp %0d", X, Y, out_pix, e); end
    if (X + Y * (W / 2) != n_out) failures++;
    if (cyc - t_in[2 * Y + 2][2 * X + 2] != 2 + 1) begin
      failures++; if (failures < 5) $display("latency %0d", cyc - t_in[2 * Y + 2][2 * X + 2]);
    end
    n_out++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
