// Testbench for gabor_bank: a random 20x14 image is filtered and every
// response C_q, S_q of every pixel is compared with a direct floating-point 2D
// convolution with the complex Gabor kernel exp(-(x^2+y^2)/(2 sigma^2))
// exp(j w0 (x cos th_q + y sin th_q)), w0 = pi/2, sigma = 2, zero outside the
// image.  Tolerance: 12 + 1.5% of the magnitude (coefficient and integer
// rounding).  Also checks that each of the 280 centers comes out once.
module tb_gabor_bank;
  import vision_pkg::*;
  localparam int IW = 20, IH = 14, M = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] img_w = IW, img_h = IH;
  logic in_valid = 0;
  logic [15:0] in_x = 0, in_y = 0;
  logic [7:0]  in_pix = 0;
  logic out_valid, out_inside;
  logic [15:0] out_x, out_y;
  gab_t c [N_ORIENT], s [N_ORIENT];
  gabor_bank #(.TAPS(11), .LBW(32)) dut (.*);

  int img [IH][IW];
  int seen = 0;

  function automatic int pixel(int x, int y);
    if (x < 0 || y < 0 || x >= IW || y >= IH) return 0;
    return img[y][x];
  endfunction

  task automatic reference(int x, int y, int q, output real re, output real im);
    real th, g, a;
    re = 0; im = 0;
    th = q * 3.14159265358979 / 8.0;
    for (int v = -5; v <= 5; v++)
      for (int u = -5; u <= 5; u++) begin
        g = $exp(-(u * u + v * v) / 8.0);
        a = 3.14159265358979 / 2.0 * (u * $cos(th) + v * $sin(th));
        re += pixel(x - u, y - v) * g * $cos(a);
        im += pixel(x - u, y - v) * g * $sin(a);
      end
  endtask

  initial begin
    foreach (img[y, x]) img[y][x] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < IH + M; y++)
      for (int x = 0; x < IW + M; x++) begin
        in_valid <= 1; in_x <= 16'(x); in_y <= 16'(y);
        in_pix <= 8'(pixel(x, y));
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (seen != IW * IH) begin failures++; $display("saw %0d centers", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid && out_inside) begin
    seen++;
    for (int q = 0; q < N_ORIENT; q++) begin
      real re, im, tol;
      reference(int'(out_x), int'(out_y), q, re, im);
      tol = 12.0 + 0.015 * $sqrt(re * re + im * im);
      checks += 2;
      if (real'(c[q]) - re > tol || re - real'(c[q]) > tol ||
          real'(s[q]) - im > tol || im - real'(s[q]) > tol) begin
        failures++;
        if (failures < 10)
          $display("(%0d,%0d) q%0d: got %0d,%0d exp %f,%f", out_x, out_y, q, c[q], s[q], re, im);
      end
    end
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
