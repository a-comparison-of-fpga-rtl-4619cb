// Pipelined integer square root: r = floor(sqrt(a)).
//
// Stands in for the vendor square-root core of the source design; the
// restoring digit-by-digit method is this design's choice.  Stage k decides
// one result bit, from the most significant down, so the pipeline has W/2
// stages plus an input register.  One result per clock, latency LAT = W/2 + 1.
module isqrt #(
  parameter int W = 32     // radicand width, even
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     a,
  output logic             out_valid,
  output logic [W/2-1:0]   r
);
  localparam int N = W / 2;

  logic [W-1:0]   rem [N+1];
  logic [N-1:0]   res [N+1];
  logic           v   [N+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin rem[0] <= '0; res[0] <= '0; v[0] <= 1'b0; end
    else begin rem[0] <= a; res[0] <= '0; v[0] <= in_valid; end
  end

  for (genvar k = 0; k < N; k++) begin : g_st
    localparam int B = N - 1 - k;            // result bit decided here
    logic [W-1:0] trial;
    // (res + 2^B)^2 - res^2 = 2*res*2^B + 2^(2B)
    assign trial = (W'(res[k]) << (B + 1)) + (W'(1) << (2 * B));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin rem[k+1] <= '0; res[k+1] <= '0; v[k+1] <= 1'b0; end
      else begin
        v[k+1] <= v[k];
        if (rem[k] >= trial) begin
          rem[k+1] <= rem[k] - trial;
          res[k+1] <= res[k] | (N'(1) << B);
        end else begin
          rem[k+1] <= rem[k];
          res[k+1] <= res[k];
        end
      end
    end
  end

  assign out_valid = v[N];
  assign r         = res[N];

endmodule
