// Testbench for window_gen: a random 9x6 image streamed over the extended
// raster (margin 2 for K = 5); every window inside the image is compared with
// the image, zero outside; all 54 centers must appear exactly once.
module tb_window_gen;
  localparam int K = 5, IW = 9, IH = 6, M = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] img_w = IW, img_h = IH;
  logic in_valid = 0;
  logic [15:0] in_x = 0, in_y = 0;
  logic [7:0]  in_d = 0;
  logic col_valid, out_valid, out_inside;
  logic [15:0] col_x, col_y, out_x, out_y;
  logic [7:0] col [K];
  logic [7:0] win [K][K];
  window_gen #(.K(K), .DW(8), .LBW(16), .CW(16)) dut (.*);

  logic [7:0] img [IH][IW];
  int seen = 0;

  function automatic int pixel(int x, int y);
    if (x < 0 || y < 0 || x >= IW || y >= IH) return 0;
    return img[y][x];
  endfunction

  initial begin
    foreach (img[y, x]) img[y][x] = 8'($urandom_range(1, 255));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < IH + M; y++)
      for (int x = 0; x < IW + M; x++) begin
        in_valid <= 1; in_x <= 16'(x); in_y <= 16'(y);
        in_d <= (x < IW && y < IH) ? img[y][x] : 8'hAA;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (seen != IW * IH) begin failures++; $display("saw %0d centers", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid && out_inside) begin
    seen++;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        checks++;
        if (int'(win[r][c]) != pixel(int'(out_x) + c - 2, int'(out_y) + r - 2)) begin
          failures++;
          $display("win (%0d,%0d)[%0d][%0d] = %0d exp %0d", out_x, out_y, r, c, win[r][c],
                   pixel(int'(out_x) + c - 2, int'(out_y) + r - 2));
        end
      end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
