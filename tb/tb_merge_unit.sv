// Testbench for merge_unit: random residual / prior pairs (valid or not),
// compared with residual + prior (invalid prior counts as zero), saturated to
// 12 bits; an invalid residual gives an invalid result.  Latency 1 clock.
module tb_merge_unit;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  est_ok_t res, prior, sum;
  merge_unit dut (.*);

  initial begin
    res = '0; prior = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int e;
      bit ok;
      @(negedge clk);
      res.ok = $urandom_range(0, 7) != 0; prior.ok = $urandom_range(0, 3) != 0;
      res.v = 12'($urandom); prior.v = 12'($urandom);
      if (i % 50 == 0) begin res.v = 12'sd2000; prior.v = 12'sd1000; end   // saturation
      e = int'(res.v) + (prior.ok ? int'(prior.v) : 0);
      if (e > 2047) e = 2047;
      if (e < -2048) e = -2048;
      ok = res.ok;
      @(posedge clk);   // registered: result visible after this edge
      #1;
      checks++;
      if (sum.ok != ok || (ok && int'(sum.v) != e)) begin
        failures++;
        if (failures < 5) $display("%0d: got %0d/%0d exp %0d/%0d", i, sum.ok, sum.v, ok, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
