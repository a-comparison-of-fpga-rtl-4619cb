// 2D image warp with bilinear interpolation for the optical flow path.
//
// Produces I(x + ux, y + uy) for one frame of the current scale, where
// (ux, uy) is a displacement in 1/16 pixel (the top passes -u for frame t-1
// and +u for frame t+1, u being the expanded flow of the coarser scale, which
// warps both outer frames towards the center frame as in eq. 16 of the
// phase-based scheme, reduced to three frames).  The 2x2 neighbourhood of the
// sample point always covers the four parity banks, so it is read in one clock;
// the source design stores a 2x2 window per pixel for the same purpose.
// Sample points outside the image are clamped to the border (this design's
// choice).  Warping images instead of filter responses follows the source
// design.
//
// Timing: raddr combinational, data one clock later, registered output:
// latency 2 clocks, one pixel per clock.
module warp_2d
  import vision_pkg::*;
#(
  parameter int AW = 17
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CRD_W-1:0]   img_w,
  input  logic [CRD_W-1:0]   img_h,
  input  logic [AW-1:0]      base,
  input  logic               in_valid,
  input  logic [CRD_W-1:0]   x,
  input  logic [CRD_W-1:0]   y,
  input  est_ok_t            ux,
  input  est_ok_t            uy,
  output logic [AW-1:0]      raddr [4],
  input  logic [PIX_W-1:0]   rdata [4],
  output logic               out_valid,
  output logic [PIX_W-1:0]   pix
);
  // One axis: integer position, clamped, and its fraction.
  function automatic void axis(input logic [CRD_W-1:0] p, input est_ok_t u,
                               input logic [CRD_W-1:0] n,
                               output logic [CRD_W-1:0] p0, output logic [3:0] f);
    logic signed [CRD_W+1:0] pi;
    pi = $signed({2'b0, p}) + (u.ok ? (CRD_W+2)'(u.v >>> 4) : '0);
    f  = u.ok ? u.v[3:0] : 4'd0;
    if (pi < 0) begin p0 = '0; f = '0; end
    else if (pi >= $signed({2'b0, n}) - 1) begin p0 = n - 1'b1; f = '0; end
    else p0 = CRD_W'(pi);
  endfunction

  logic [CRD_W-1:0] x0, y0;
  logic [3:0]       fx, fy;

  always_comb begin
    axis(x, ux, img_w, x0, fx);
    axis(y, uy, img_h, y0, fy);
    for (int b = 0; b < 4; b++) begin
      logic [CRD_W-1:0] bx, by;
      bx = (x0[0] == b[0]) ? x0 : x0 + 1'b1;
      by = (y0[0] == b[1]) ? y0 : y0 + 1'b1;
      if (bx >= img_w) bx = x0;    // weight is zero there
      if (by >= img_h) by = y0;
      raddr[b] = base + AW'(qaddr(bx, by, img_w));
    end
  end

  logic       v1, xp, yp;
  logic [3:0] fx1, fy1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; xp <= 1'b0; yp <= 1'b0; fx1 <= '0; fy1 <= '0; end
    else begin v1 <= in_valid; xp <= x0[0]; yp <= y0[0]; fx1 <= fx; fy1 <= fy; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin out_valid <= 1'b0; pix <= '0; end
    else begin
      logic [17:0] p00, p01, p10, p11, wx0, wx1, wy0, wy1, acc;
      p00 = 18'(rdata[{yp, xp}]);        // (x0,   y0)
      p01 = 18'(rdata[{yp, ~xp}]);       // (x0+1, y0)
      p10 = 18'(rdata[{~yp, xp}]);       // (x0,   y0+1)
      p11 = 18'(rdata[{~yp, ~xp}]);      // (x0+1, y0+1)
      wx1 = 18'(fx1); wx0 = 18'd16 - wx1;
      wy1 = 18'(fy1); wy0 = 18'd16 - wy1;
      acc = p00 * wx0 * wy0 + p01 * wx1 * wy0 + p10 * wx0 * wy1 + p11 * wx1 * wy1;
      out_valid <= v1;
      pix <= PIX_W'((acc + 18'd128) >> 8);
    end
  end
endmodule
