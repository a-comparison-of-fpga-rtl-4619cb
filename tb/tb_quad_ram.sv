// Testbench for quad_ram: a 20x12 image is written pixel by pixel to the bank
// and address given by qaddr; then every 2x2 neighbourhood is read in one
// clock through two read ports (one address per bank) and compared.  The
// read data must appear exactly one clock after the address.
module tb_quad_ram;
  import vision_pkg::*;
  localparam int W = 20, H = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  logic [1:0] wbank = 0;
  logic [6:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic [6:0] raddr [2][4];
  logic [7:0] rdata [2][4];
  quad_ram #(.DW(8), .DEPTH(100), .NR(2)) dut (.*);

  function automatic logic [7:0] img(int x, int y);
    return 8'(x * 13 + y * 7 + 5);
  endfunction

  initial begin
    foreach (raddr[r, b]) raddr[r][b] = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        we = 1; wbank = {y[0], x[0]}; waddr = 7'(qaddr(16'(x), 16'(y), 16'(W))); wdata = img(x, y);
      end
    @(negedge clk) we = 0;
    for (int y = 0; y < H - 1; y++)
      for (int x = 0; x < W - 1; x++) begin
        @(negedge clk);
        for (int r = 0; r < 2; r++)
          for (int b = 0; b < 4; b++) begin
            int bx, by;
            bx = (x % 2 == b % 2) ? x : x + 1;
            by = (y % 2 == b / 2) ? y : y + 1;
            raddr[r][b] = 7'(qaddr(16'(bx), 16'(by), 16'(W)));
          end
        @(negedge clk);   // one clock later
        foreach (raddr[r, b]) raddr[r][b] = '0;
        for (int r = 0; r < 2; r++)
          for (int b = 0; b < 4; b++) begin
            int bx, by;
            bx = (x % 2 == b % 2) ? x : x + 1;
            by = (y % 2 == b / 2) ? y : y + 1;
            checks++;
            if (rdata[r][b] != img(bx, by)) begin
              failures++;
              if (failures < 5) $display("(%0d,%0d) port %0d bank %0d: %0d exp %0d", x, y, r, b, rdata[r][b], img(bx, by));
            end
          end
        @(posedge clk); #1;
        // the address changed to 0 one clock ago: data follows (latency 1)
        checks++;
        if (rdata[0][0] != img(0, 0)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
