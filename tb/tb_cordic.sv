// Testbench for cordic: random vectors, angle against $atan2 (within 3 binary
// angle steps of 2^12 per turn), magnitude against sqrt (within 1% + 2), and
// the pipeline latency ITER + 2 (sampled one edge after the result is
// registered, hence the +1 in the count).
module tb_cordic;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic signed [16:0] x = 0, y = 0;
  logic [11:0] angle;
  logic [17:0] mag;
  cordic #(.IW(17), .AW(12), .ITER(12)) dut (.*);

  localparam int NV = 200;
  real ex_ang [NV], ex_mag [NV];
  int  sent = 0, got = 0, t_in = 0, t_first = -1, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      int xi, yi;
      xi = $urandom_range(0, 40000) - 20000;
      yi = $urandom_range(0, 40000) - 20000;
      if (i == 0) begin xi = -1000; yi = 0; end
      ex_ang[i] = $atan2(real'(yi), real'(xi)) / (2.0 * 3.14159265358979) * 4096.0;
      ex_mag[i] = $sqrt(real'(xi) * xi + real'(yi) * yi);
      x <= 17'(xi); y <= 17'(yi); in_valid <= 1;
      if (i == 0) t_in = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int d;
    d = int'(angle) - int'($floor(ex_ang[got] + 0.5));
    d = ((d % 4096) + 4096 + 2048) % 4096 - 2048;
    checks++;
    if (d > 3 || d < -3) begin
      failures++; $display("angle mismatch %0d: got %0d exp %f", got, angle, ex_ang[got]);
    end
    checks++;
    if ((real'(mag) - ex_mag[got]) > 0.01 * ex_mag[got] + 2.0 || (ex_mag[got] - real'(mag)) > 0.01 * ex_mag[got] + 2.0) begin
      failures++; $display("mag mismatch %0d: got %0d exp %f", got, mag, ex_mag[got]);
    end
    if (got == 0) begin
      checks++;
      if (cyc - t_in != 14 + 1) begin failures++; $display("latency %0d", cyc - t_in); end
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
