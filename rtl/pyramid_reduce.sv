// Image pyramid reduction: 5x5 low-pass filter and 2:1 subsampling.
//
// The source design builds the pyramid iteratively with a five-tap low-pass
// filter and subsampling; the binomial weights [1 4 6 4 1]/16 (applied
// separably, 256 in total) are this design's choice.  The level to reduce is
// streamed in over an extended raster (two extra columns and rows, see
// window_gen); every window whose center has even x and y and lies inside the
// image yields one pixel of the next level, at (x/2, y/2).
// Timing: latency 2 clocks after the pixel completing the window.
module pyramid_reduce
  import vision_pkg::*;
#(
  parameter int LBW = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CRD_W-1:0]  img_w,
  input  logic [CRD_W-1:0]  img_h,
  input  logic              in_valid,
  input  logic [CRD_W-1:0]  in_x,
  input  logic [CRD_W-1:0]  in_y,
  input  logic [PIX_W-1:0]  in_pix,
  output logic              out_valid,
  output logic [CRD_W-1:0]  out_x,
  output logic [CRD_W-1:0]  out_y,
  output logic [PIX_W-1:0]  out_pix
);
  localparam int W5 [5] = '{1, 4, 6, 4, 1};

  logic             wv, wi, cv_unused;
  logic [CRD_W-1:0] wx, wy, cx_unused, cy_unused;
  logic [PIX_W-1:0] win [5][5];
  logic [PIX_W-1:0] col_unused [5];

  window_gen #(.K(5), .DW(PIX_W), .LBW(LBW), .CW(CRD_W)) u_win (
    .clk, .rst_n, .img_w, .img_h, .in_valid, .in_x, .in_y, .in_d(in_pix),
    .col_valid(cv_unused), .col_x(cx_unused), .col_y(cy_unused), .col(col_unused),
    .out_valid(wv), .out_inside(wi), .out_x(wx), .out_y(wy), .win);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_x <= '0; out_y <= '0; out_pix <= '0;
    end else begin
      logic [17:0] acc;
      acc = '0;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          acc += 18'(win[r][c]) * 18'(W5[r] * W5[c]);
      out_valid <= wv && wi && !wx[0] && !wy[0];
      out_x     <= wx >> 1;
      out_y     <= wy >> 1;
      out_pix   <= PIX_W'((acc + 18'd128) >> 8);
    end
  end
endmodule
