// Gabor filterbank core (one bank): N_ORIENT = 8 oriented complex Gabor
// filters of TAPS x TAPS = 11x11 pixels, peak period 4 pixels, applied to one
// raster-scanned image at one pixel per clock.
//
// The filter of orientation q is g(x)g(y)exp(j w0 (x cos th_q + y sin th_q)),
// which factors into a complex column filter and a complex row filter.  Each
// clock the newest 11-pixel column from the row buffers (window_gen) is
// filtered by the 8 complex column filters (16 real 1D convolutions); the
// complex column results are kept in an 11-deep shift register per orientation
// and filtered by the complex row filters (4 real 1D convolutions each), which
// yields C_q (even, real) and S_q (odd, imaginary).  The source design reaches
// the same 16 responses with 24 1D convolutions by exploiting filter symmetry;
// this direct form is this design's choice.  Coefficients are computed at
// elaboration as 12-bit integers (scale 1024); sigma = 2.0 is this design's
// choice.  Results are integers (>>10 after each pass), saturated to 16 bits.
//
// Interface: extended-raster pixel stream in (see window_gen); out_* is the
// response at center (in_x-5, in_y-5), out_inside marks centers inside the
// image.  Latency 4 clocks from the pixel that completes the window, i.e.
// about 5.5 image rows after the center pixel enters; throughput 1 pixel/clock.
module gabor_bank
  import vision_pkg::*;
#(
  parameter int TAPS = 11,
  parameter int LBW  = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CRD_W-1:0]      img_w,
  input  logic [CRD_W-1:0]      img_h,
  input  logic                  in_valid,
  input  logic [CRD_W-1:0]      in_x,
  input  logic [CRD_W-1:0]      in_y,
  input  logic [PIX_W-1:0]      in_pix,
  output logic                  out_valid,
  output logic                  out_inside,
  output logic [CRD_W-1:0]      out_x,
  output logic [CRD_W-1:0]      out_y,
  output gab_t                  c [N_ORIENT],
  output gab_t                  s [N_ORIENT]
);
  localparam int HALF = (TAPS - 1) / 2;
  localparam int SW   = 36;

  logic              cv;
  logic [CRD_W-1:0]  cx, cy;
  logic [PIX_W-1:0]  colpix [TAPS];
  logic              wv_unused, wi_unused;
  logic [CRD_W-1:0]  wx_unused, wy_unused;
  logic [PIX_W-1:0]  win_unused [TAPS][TAPS];

  window_gen #(.K(TAPS), .DW(PIX_W), .LBW(LBW), .CW(CRD_W)) u_win (
    .clk, .rst_n, .img_w, .img_h,
    .in_valid, .in_x, .in_y, .in_d(in_pix),
    .col_valid(cv), .col_x(cx), .col_y(cy), .col(colpix),
    .out_valid(wv_unused), .out_inside(wi_unused), .out_x(wx_unused), .out_y(wy_unused),
    .win(win_unused));

  // ---- column pass -----------------------------------------------------
  gab_t             cre [N_ORIENT], cim [N_ORIENT];
  logic             s1_v;
  logic [CRD_W-1:0] s1_x, s1_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_x <= '0; s1_y <= '0;
      for (int q = 0; q < N_ORIENT; q++) begin cre[q] <= '0; cim[q] <= '0; end
    end else begin
      s1_v <= cv;
      if (cv) begin
        s1_x <= cx; s1_y <= cy;
        for (int q = 0; q < N_ORIENT; q++) begin
          logic signed [SW-1:0] ar, ai;
          ar = '0; ai = '0;
          for (int i = 0; i < TAPS; i++) begin
            // convolution: tap at row offset (i-HALF) uses filter index (HALF-i)
            ar += SW'($signed({1'b0, colpix[i]}) * gabor_coef(q, TAPS-1-i, HALF, 1'b0, 1'b0));
            ai += SW'($signed({1'b0, colpix[i]}) * gabor_coef(q, TAPS-1-i, HALF, 1'b0, 1'b1));
          end
          cre[q] <= GAB_W'(ar >>> 10);
          cim[q] <= GAB_W'(ai >>> 10);
        end
      end
    end
  end

  // ---- shift register of column results -------------------------------
  gab_t             hre [N_ORIENT][TAPS], him [N_ORIENT][TAPS];
  logic             s2_v;
  logic [CRD_W-1:0] s2_x, s2_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_x <= '0; s2_y <= '0;
      for (int q = 0; q < N_ORIENT; q++)
        for (int j = 0; j < TAPS; j++) begin hre[q][j] <= '0; him[q][j] <= '0; end
    end else begin
      s2_v <= s1_v;
      if (s1_v) begin
        s2_x <= s1_x; s2_y <= s1_y;
        for (int q = 0; q < N_ORIENT; q++) begin
          for (int j = 0; j < TAPS - 1; j++) begin
            hre[q][j] <= hre[q][j+1];
            him[q][j] <= him[q][j+1];
          end
          hre[q][TAPS-1] <= cre[q];
          him[q][TAPS-1] <= cim[q];
        end
      end
    end
  end

  // ---- row pass ---------------------------------------------------------
  function automatic gab_t sat(input logic signed [SW-1:0] v);
    if (v > SW'(32767))       return 16'sh7fff;
    else if (v < -SW'(32768)) return 16'sh8000;
    else                      return GAB_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_inside <= 1'b0; out_x <= '0; out_y <= '0;
      for (int q = 0; q < N_ORIENT; q++) begin c[q] <= '0; s[q] <= '0; end
    end else begin
      out_valid  <= s2_v && s2_x >= CRD_W'(HALF) && s2_y >= CRD_W'(HALF);
      out_x      <= s2_x - CRD_W'(HALF);
      out_y      <= s2_y - CRD_W'(HALF);
      out_inside <= (s2_x - CRD_W'(HALF)) < img_w && (s2_y - CRD_W'(HALF)) < img_h;
      for (int q = 0; q < N_ORIENT; q++) begin
        logic signed [SW-1:0] re, im;
        re = '0; im = '0;
        for (int j = 0; j < TAPS; j++) begin
          // column j holds image column s2_x-(TAPS-1)+j; left of the image is zero
          if (s2_x + CRD_W'(j) >= CRD_W'(TAPS - 1)) begin
            re += SW'(hre[q][j] * gabor_coef(q, TAPS-1-j, HALF, 1'b1, 1'b0))
                - SW'(him[q][j] * gabor_coef(q, TAPS-1-j, HALF, 1'b1, 1'b1));
            im += SW'(hre[q][j] * gabor_coef(q, TAPS-1-j, HALF, 1'b1, 1'b1))
                + SW'(him[q][j] * gabor_coef(q, TAPS-1-j, HALF, 1'b1, 1'b0));
          end
        end
        c[q] <= sat(re >>> 10);
        s[q] <= sat(im >>> 10);
      end
    end
  end

endmodule
