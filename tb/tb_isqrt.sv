// Testbench for isqrt: random radicands and edge values against an integer
// reference (r*r <= a < (r+1)*(r+1)), plus the latency W/2 + 1.
module tb_isqrt;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, t0 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid = 0, out_valid;
  logic [35:0] a = 0;
  logic [17:0] r;
  isqrt #(.W(36)) dut (.*);

  localparam int NV = 300;
  longint av [NV];
  int got = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      longint v;
      v = {$urandom, $urandom} & 64'hF_FFFF_FFFF;
      if (i == 0) v = 0;
      if (i == 1) v = 64'hF_FFFF_FFFF;
      if (i == 2) v = 144;
      if (i == 3) v = 143;
      if (i > 3 && i < 100) v = v >> $urandom_range(0, 34);
      av[i] = v;
      a <= 36'(v); in_valid <= 1;
      if (i == 0) t0 = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint rr;
    rr = longint'(r);
    checks++;
    if (!(rr * rr <= av[got] && (rr + 1) * (rr + 1) > av[got])) begin
      failures++; $display("isqrt(%0d) = %0d wrong", av[got], r);
    end
    if (got == 0) begin
      checks++;
      if (cyc - t0 != 19 + 1) begin failures++; $display("latency %0d", cyc - t0); end
    end
    got++;
    if (got == NV) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
