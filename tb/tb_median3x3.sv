// Testbench for median3x3: a 14x9 field of random estimates (about 30 %
// invalid) is streamed over the extended raster (image plus two columns and
// rows).  For every pixel the reference collects the valid samples of the
// 3x3 neighbourhood inside the image: with fewer than 5 the output must be
// invalid, otherwise it must equal a middle element of the sorted samples
// (either one for an even count).  The auxiliary word must leave with its own
// pixel.  Latency: the output for (x, y) must come 11 clocks after the input
// of (x+1, y+1), the sample completing its window.
module tb_median3x3;
  import vision_pkg::*;
  localparam int W = 14, H = 9, M = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [CRD_W-1:0] img_w = W, img_h = H, in_x = 0, in_y = 0, out_x, out_y;
  logic in_valid = 0, in_ok = 0, out_valid, out_inside, out_ok;
  logic signed [11:0] in_d = 0, out_d;
  logic [7:0] in_aux = 0, out_aux;
  median3x3 #(.LBW(32), .AUXW(8)) dut (.*);

  int fd [H][W];
  bit fok [H][W];
  int t_in [H + M][W + M];
  int n_out = 0;

  initial begin
    foreach (fd[y, x]) begin fd[y][x] = $urandom_range(0, 400) - 200; fok[y][x] = $urandom_range(0, 9) > 2; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H + M; y++)
      for (int x = 0; x < W + M; x++) begin
        in_valid <= 1; in_x <= 16'(x); in_y <= 16'(y);
        in_ok <= (x < W && y < H) ? fok[y][x] : 1'b0;
        in_d <= (x < W && y < H) ? 12'(fd[y][x]) : 12'sd0;
        in_aux <= 8'(x * 16 + y);
        t_in[y][x] = cyc;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (n_out != W * H) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && out_inside) begin
    int v [$];
    int x, y;
    x = int'(out_x); y = int'(out_y);
    v.delete();
    n_out++;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (x + dx >= 0 && x + dx < W && y + dy >= 0 && y + dy < H && fok[y + dy][x + dx])
          v.push_back(fd[y + dy][x + dx]);
    for (int i = 1; i < v.size(); i++)          // insertion sort (signed)
      for (int j = i; j > 0 && v[j] < v[j - 1]; j--) begin
        int t;
        t = v[j]; v[j] = v[j - 1]; v[j - 1] = t;
      end
    checks += 3;
    if (v.size() < 5) begin
      if (out_ok) begin failures++; $display("(%0d,%0d) should be invalid", x, y); end
    end else if (!out_ok || (int'(out_d) != v[v.size() / 2] && int'(out_d) != v[(v.size() - 1) / 2])) begin
      failures++; $display("(%0d,%0d) got %0d/%0d exp %p", x, y, out_ok, out_d, v);
    end
    if (out_aux != 8'(x * 16 + y)) failures++;
    if (cyc - t_in[y + 1][x + 1] != 11 + 1) begin
      failures++; if (failures < 5) $display("latency %0d", cyc - t_in[y + 1][x + 1]);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
