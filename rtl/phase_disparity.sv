// Phase-difference disparity for one pixel (single scale).
//
// For each orientation q the left and right phases (binary angles) are
// subtracted; two's-complement wrap performs the reduction to ]-pi, pi].  The
// difference is divided by w0 cos(theta_q) through a constant multiplier
// (vision_pkg::disp_recip) giving a disparity in 1/16 pixel.  The vertical
// filter (cos = 0) and orientations whose left or right amplitude is below
// AMP_MIN are invalid.  The estimates are combined by a median: invalid ones
// are replaced alternately by a very large and a very small key and all 8 are
// sorted, so that element 3 is the lower median of the valid ones.  The
// result is valid when at least MIN_VALID orientations were.  The invalid-key
// trick, AMP_MIN and MIN_VALID are this design's choices.
//
// Timing: one pixel per clock, latency 1 + N_ORIENT = 9 clocks.
module phase_disparity
  import vision_pkg::*;
#(
  parameter int MIN_VALID = 3,
  parameter int AMP_MIN   = 8,
  parameter int SB        = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [SB-1:0]  in_sb,
  input  phase_t         phl  [N_ORIENT],
  input  phase_t         phr  [N_ORIENT],
  input  amp_t           ampl [N_ORIENT],
  input  amp_t           ampr [N_ORIENT],
  output logic           out_valid,
  output logic [SB-1:0]  out_sb,
  output est_ok_t        disp
);
  localparam int KW = EST_W + 2;
  localparam logic signed [KW-1:0] BIG = KW'(1 << (KW - 2));

  logic signed [KW-1:0] key [N_ORIENT];
  logic [3:0]           nval;
  logic                 v1;
  logic [SB-1:0]        sb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sb1 <= '0; nval <= '0;
      for (int q = 0; q < N_ORIENT; q++) key[q] <= '0;
    end else begin
      logic [3:0] n, k;
      n = '0; k = '0;
      v1 <= in_valid; sb1 <= in_sb;
      for (int q = 0; q < N_ORIENT; q++) begin
        logic signed [PH_W-1:0] dphi;
        logic signed [PH_W+20:0] prod;
        dphi = $signed(phl[q] - phr[q]);
        prod = dphi * disp_recip(q);
        if (disp_recip(q) != 0 && ampl[q] > AMP_W'(AMP_MIN) && ampr[q] > AMP_W'(AMP_MIN)) begin
          key[q] <= KW'((prod + (PH_W+21)'(32768)) >>> 16);
          n = n + 1'b1;
        end else begin
          key[q] <= k[0] ? -BIG : BIG;
          k = k + 1'b1;
        end
      end
      nval <= n;
    end
  end

  logic signed [KW-1:0] srt [N_ORIENT];
  logic [3:0]           nval_o;
  sort_net #(.N(N_ORIENT), .W(KW), .SB(SB + 4)) u_sort (
    .clk, .rst_n, .in_valid(v1), .in_sb({sb1, nval}), .d(key),
    .out_valid, .out_sb({out_sb, nval_o}), .q(srt));

  always_comb begin
    logic signed [KW-1:0] m;
    m = srt[3];
    disp.ok = nval_o >= 4'(MIN_VALID);
    if (m > KW'(2047))       disp.v = 12'sd2047;
    else if (m < -KW'(2048)) disp.v = -12'sd2048;
    else                     disp.v = EST_W'(m);
  end
endmodule
