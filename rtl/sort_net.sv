// Pipelined sorting network (odd-even transposition), ascending order.
//
// N signed keys of W bits enter together; stage k compares neighbours
// (i, i+1) with i = k mod 2, 4 ... and swaps them if out of order.  After N
// stages the keys are sorted.  Each stage is one register level, so the
// network accepts one key set per clock with latency N.  A sideband of SB
// bits travels alongside.  Used by the orientation median and the 3x3
// spatial median; the network topology is this design's choice.
module sort_net #(
  parameter int N  = 8,
  parameter int W  = 13,
  parameter int SB = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [SB-1:0]       in_sb,
  input  logic signed [W-1:0] d [N],
  output logic                out_valid,
  output logic [SB-1:0]       out_sb,
  output logic signed [W-1:0] q [N]
);
  logic signed [W-1:0] st [N+1][N];
  logic                v  [N+1];
  logic [SB-1:0]       sb [N+1];

  always_comb begin
    st[0] = d;
    v[0]  = in_valid;
    sb[0] = in_sb;
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[k+1]  <= 1'b0;
        sb[k+1] <= '0;
        for (int i = 0; i < N; i++) st[k+1][i] <= '0;
      end else begin
        v[k+1]  <= v[k];
        sb[k+1] <= sb[k];
        for (int i = 0; i < N; i++) st[k+1][i] <= st[k][i];
        for (int i = k % 2; i + 1 < N; i += 2)
          if (st[k][i] > st[k][i+1]) begin
            st[k+1][i]   <= st[k][i+1];
            st[k+1][i+1] <= st[k][i];
          end
      end
    end
  end

  assign q         = st[N];
  assign out_valid = v[N];
  assign out_sb    = sb[N];
endmodule
