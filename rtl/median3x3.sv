// 3x3 spatial median of a field of estimates with validity flags.
//
// A 3-row window (window_gen, K = 3) slides over the extended raster.  The
// median is output when at least 5 of the 9 samples are valid (the majority
// rule of the source design), otherwise the output is flagged invalid.
// Invalid samples (including those outside the image) are replaced
// alternately by a very large and a very small key before a 9-input sorting
// network, so that element 4 is the median of the valid samples (the upper
// one for an even count) - this replacement is this design's choice.
//
// The auxiliary word in_aux of the center sample leaves with the median
// (out_aux), which keeps other per-pixel data aligned with it.
//
// Interface: extended-raster stream in; out_x/out_y = (in_x-1, in_y-1),
// out_inside marks centers inside the image.
// Timing: one sample per clock, latency 1 + 1 + 9 = 11 clocks.
module median3x3
  import vision_pkg::*;
#(
  parameter int DW  = EST_W,
  parameter int LBW = 1024,
  parameter int AUXW = 1            // auxiliary data carried with the center sample
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CRD_W-1:0]     img_w,
  input  logic [CRD_W-1:0]     img_h,
  input  logic                 in_valid,
  input  logic [CRD_W-1:0]     in_x,
  input  logic [CRD_W-1:0]     in_y,
  input  logic                 in_ok,
  input  logic signed [DW-1:0] in_d,
  input  logic [AUXW-1:0]      in_aux,
  output logic                 out_valid,
  output logic                 out_inside,
  output logic [CRD_W-1:0]     out_x,
  output logic [CRD_W-1:0]     out_y,
  output logic                 out_ok,
  output logic signed [DW-1:0] out_d,
  output logic [AUXW-1:0]      out_aux
);
  localparam int KW = DW + 2;
  localparam logic signed [KW-1:0] BIG = KW'(1 << (KW - 2));

  logic              wv, wi;
  logic [CRD_W-1:0]  wx, wy, cx_unused, cy_unused;
  logic              cv_unused;
  logic [AUXW+DW:0]  win [3][3];
  logic [AUXW+DW:0]  col_unused [3];

  window_gen #(.K(3), .DW(AUXW + DW + 1), .LBW(LBW), .CW(CRD_W)) u_win (
    .clk, .rst_n, .img_w, .img_h, .in_valid, .in_x, .in_y, .in_d({in_aux, in_ok, in_d}),
    .col_valid(cv_unused), .col_x(cx_unused), .col_y(cy_unused), .col(col_unused),
    .out_valid(wv), .out_inside(wi), .out_x(wx), .out_y(wy), .win);

  logic signed [KW-1:0] key [9];
  logic [3:0]           nval;
  logic                 v1;
  logic [AUXW+2*CRD_W:0] sb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sb1 <= '0; nval <= '0;
      for (int i = 0; i < 9; i++) key[i] <= '0;
    end else begin
      logic [3:0] n, k;
      n = '0; k = '0;
      v1  <= wv;
      sb1 <= {win[1][1][AUXW+DW:DW+1], wi, wx, wy};
      for (int i = 0; i < 9; i++) begin
        if (win[i/3][i%3][DW]) begin
          key[i] <= KW'($signed(win[i/3][i%3][DW-1:0]));
          n = n + 1'b1;
        end else begin
          key[i] <= k[0] ? -BIG : BIG;
          k = k + 1'b1;
        end
      end
      nval <= n;
    end
  end

  logic signed [KW-1:0] srt [9];
  logic [3:0]           nval_o;
  sort_net #(.N(9), .W(KW), .SB(AUXW + 2 * CRD_W + 5)) u_sort (
    .clk, .rst_n, .in_valid(v1), .in_sb({sb1, nval}), .d(key),
    .out_valid, .out_sb({out_aux, out_inside, out_x, out_y, nval_o}), .q(srt));

  assign out_ok = nval_o >= 4'd5;
  assign out_d  = out_ok ? DW'(srt[4]) : '0;
endmodule
