// Testbench for warp_2d: a random 20x14 image sits in a four-bank memory
// model (bank {y[0],x[0]}, address base + qaddr, registered read, as in
// quad_ram) at a non-zero base.  For random pixels and random displacements
// in 1/16 pixel (some far outside the image, some invalid) the output must
// equal the bilinear interpolation worked out here: sample point
// x + ux/16, clamped to the image (fraction dropped at the border), weights
// from the 4 fractional bits, rounded.  Latency 2 clocks (+1 for sampling).
module tb_warp_2d;
  import vision_pkg::*;
  localparam int W = 20, H = 14, BASE = 9, AW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [CRD_W-1:0] img_w = W, img_h = H, x = 0, y = 0;
  logic [AW-1:0] base = BASE;
  logic in_valid = 0, out_valid;
  est_ok_t ux, uy;
  logic [AW-1:0] raddr [4];
  logic [7:0] rdata [4], pix;
  warp_2d #(.AW(AW)) dut (.*);

  int im [H][W];
  logic [7:0] mem [4][1 << AW];
  always @(posedge clk) for (int b = 0; b < 4; b++) rdata[b] <= mem[b][raddr[b]];

  function automatic void axis(int p, int u, bit ok, int n, output int p0, output int f);
    int q;
    q = p * 16 + (ok ? u : 0);
    p0 = q >>> 4; f = q & 15;
    if (p0 < 0) begin p0 = 0; f = 0; end
    else if (p0 >= n - 1) begin p0 = n - 1; f = 0; end
  endfunction

  int ex [$], t0 [$];
  initial begin
    foreach (mem[b, a]) mem[b][a] = 8'hA5;
    foreach (im[yy, xx]) begin
      im[yy][xx] = $urandom_range(0, 255);
      mem[{yy[0], xx[0]}][BASE + qaddr(16'(xx), 16'(yy), 16'(W))] = 8'(im[yy][xx]);
    end
    foreach (rdata[b]) rdata[b] = 0;
    ux = '0; uy = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      int px, py, vx, vy, x0, y0, fx, fy, acc;
      bit okx;
      px = $urandom_range(0, W - 1); py = $urandom_range(0, H - 1);
      vx = $urandom_range(0, 160) - 80; vy = $urandom_range(0, 160) - 80;
      if (i % 50 == 0) vx = 700;                 // far outside
      okx = $urandom_range(0, 9) != 0;
      axis(px, vx, okx, W, x0, fx);
      axis(py, vy, okx, H, y0, fy);
      acc = im[y0][x0] * (16 - fx) * (16 - fy)
          + ((fx != 0) ? im[y0][x0 + 1] * fx * (16 - fy) : 0)
          + ((fy != 0) ? im[y0 + 1][x0] * (16 - fx) * fy : 0)
          + ((fx != 0 && fy != 0) ? im[y0 + 1][x0 + 1] * fx * fy : 0);
      ex.push_back((acc + 128) >> 8);
      t0.push_back(cyc);
      in_valid <= 1; x <= 16'(px); y <= 16'(py);
      ux.ok <= okx; ux.v <= 12'(vx); uy.ok <= okx; uy.v <= 12'(vy);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (ex.size() != 0) begin failures++; $display("%0d outputs missing", ex.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int e, t;
    e = ex.pop_front(); t = t0.pop_front();
    checks += 2;
    if (int'(pix) != e) begin failures++; if (failures < 5) $display("got %0d exp %0d", pix, e); end
    if (cyc - t != 2 + 1) begin failures++; if (failures < 5) $display("latency %0d", cyc - t); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
