// Line-buffer window generator.
//
// Keeps the last K-1 rows of a raster-scanned image in on-chip RAM (one RAM
// per row, all read at the same column each clock, as the multiport row
// buffers of the source design) and builds a KxK window around a center pixel.
// Pixels arrive in raster order over an extended raster: columns 0..img_w-1+m
// and rows 0..img_h-1+m, with m >= (K-1)/2, so that the window of the last
// image row and column is complete without extra control.  Taps outside the
// image (negative coordinates, or >= img_w / img_h) read as zero; the zero
// border is this design's choice.
//
// Two views are produced, both registered (latency 1 clock):
//  * col_*: the newest column (K taps, top to bottom) with the coordinate of
//           the incoming pixel; separable filters use it directly.
//  * out_*/win: the full KxK window, win[row][col], centred on
//           (in_x-(K-1)/2, in_y-(K-1)/2); out_valid only when both are >= 0.
//           out_inside says whether the center lies inside the image.
module window_gen #(
  parameter int K   = 11,
  parameter int DW  = 8,
  parameter int LBW = 1024,          // longest extended row
  parameter int CW  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CW-1:0]        img_w,
  input  logic [CW-1:0]        img_h,
  input  logic                 in_valid,
  input  logic [CW-1:0]        in_x,
  input  logic [CW-1:0]        in_y,
  input  logic [DW-1:0]        in_d,
  output logic                 col_valid,
  output logic [CW-1:0]        col_x,
  output logic [CW-1:0]        col_y,
  output logic [DW-1:0]        col [K],
  output logic                 out_valid,
  output logic                 out_inside,
  output logic [CW-1:0]        out_x,
  output logic [CW-1:0]        out_y,
  output logic [DW-1:0]        win [K][K]
);
  localparam int HALF = (K - 1) / 2;
  localparam int LAW  = $clog2(LBW);

  logic [DW-1:0] lb [K-1][LBW];
  logic [DW-1:0] col_in [K];        // col_in[0] newest row (bottom)
  logic [DW-1:0] hwin [K][K];       // hwin[col][tap], col K-1 newest
  logic [LAW-1:0] la;

  assign la = LAW'(in_x);

  // Column read with row masking: tap i is image row in_y - i.
  always_comb begin
    for (int i = 0; i < K; i++) begin
      logic [DW-1:0] v;
      logic signed [CW:0] ry;
      v  = (i == 0) ? in_d : lb[i-1][la];
      ry = $signed({1'b0, in_y}) - (CW+1)'(i);
      if (ry < 0 || ry >= $signed({1'b0, img_h}) || in_x >= img_w) v = '0;
      col_in[i] = v;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb[0][la] <= in_d;
      for (int i = 1; i < K - 1; i++) lb[i][la] <= lb[i-1][la];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      col_x     <= '0;
      col_y     <= '0;
      for (int c = 0; c < K; c++)
        for (int i = 0; i < K; i++) hwin[c][i] <= '0;
    end else begin
      col_valid <= in_valid;
      if (in_valid) begin
        col_x <= in_x;
        col_y <= in_y;
        for (int c = 0; c < K - 1; c++) hwin[c] <= hwin[c+1];
        hwin[K-1] <= col_in;
      end
    end
  end

  // Newest column, top row first.
  always_comb
    for (int i = 0; i < K; i++) col[i] = hwin[K-1][K-1-i];

  // Full window with left-border masking (stale columns of the previous row).
  always_comb begin
    out_valid  = col_valid && col_x >= CW'(HALF) && col_y >= CW'(HALF);
    out_x      = col_x - CW'(HALF);
    out_y      = col_y - CW'(HALF);
    out_inside = out_x < img_w && out_y < img_h;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        win[r][c] = ($signed({1'b0, col_x}) - (CW+1)'(K - 1 - c) < 0) ? '0 : hwin[c][K-1-r];
  end

endmodule
