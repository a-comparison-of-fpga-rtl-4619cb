// Merge of the residual estimate of the current scale with the expanded
// estimate of the coarser scale (eq. 10 of the coarse-to-fine scheme):
// sum = residual + prior, saturated to the 8.4 range.  The sum is valid when
// the residual is; an invalid prior counts as zero (this design's choice).
// Timing: registered, latency 1 clock.
module merge_unit
  import vision_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  est_ok_t  res,
  input  est_ok_t  prior,
  output est_ok_t  sum
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else begin
      logic signed [EST_W:0] s;
      s = (EST_W+1)'(res.v) + (prior.ok ? (EST_W+1)'(prior.v) : '0);
      sum.ok <= res.ok;
      if (!res.ok)           sum.v <= '0;
      else if (s > 2047)     sum.v <= 12'sd2047;
      else if (s < -2048)    sum.v <= -12'sd2048;
      else                   sum.v <= EST_W'(s);
    end
  end
endmodule
