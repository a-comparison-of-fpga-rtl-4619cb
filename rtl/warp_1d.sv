// Horizontal (1D) image warp for the stereo path.
//
// Produces R(x + d, y) for the right image of the current scale, where d is
// the expanded disparity of the coarser scale in 1/16 pixel.  The two
// neighbours floor(x+d) and floor(x+d)+1 have opposite column parity, so they
// are read in the same clock from the two parity banks of row y, and
// linearly interpolated with the 4 fractional bits.  Positions outside the
// row are clamped to the border (this design's choice).  Warping the image
// rather than the filter responses follows the source design.
//
// Timing: raddr combinational from the inputs, memory data one clock later,
// registered output: latency 2 clocks.  Banks not needed get address 0.
module warp_1d
  import vision_pkg::*;
#(
  parameter int AW = 17
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CRD_W-1:0]   img_w,
  input  logic [CRD_W-1:0]   img_h,
  input  logic [AW-1:0]      base,     // level base address within each bank
  input  logic               in_valid,
  input  logic [CRD_W-1:0]   x,
  input  logic [CRD_W-1:0]   y,
  input  est_ok_t            d,
  output logic [AW-1:0]      raddr [4],
  input  logic [PIX_W-1:0]   rdata [4],
  output logic               out_valid,
  output logic [PIX_W-1:0]   pix
);
  logic signed [CRD_W+1:0] xi;
  logic [3:0]              fr;
  logic [CRD_W-1:0]        x0, yy;

  always_comb begin
    logic signed [CRD_W+1:0] dv;
    dv = d.ok ? (CRD_W+2)'(d.v >>> 4) : '0;
    fr = d.ok ? d.v[3:0] : 4'd0;
    xi = $signed({2'b0, x}) + dv;
    if (xi < 0) begin x0 = '0; fr = '0; end
    else if (xi >= $signed({2'b0, img_w}) - 1) begin x0 = img_w - 1'b1; fr = '0; end
    else x0 = CRD_W'(xi);
    yy = (y >= img_h) ? img_h - 1'b1 : y;
    for (int b = 0; b < 4; b++) begin
      logic [CRD_W-1:0] bx;
      bx = (x0[0] == b[0]) ? x0 : x0 + 1'b1;
      if (bx >= img_w) bx = x0;
      raddr[b] = (b[1] == yy[0]) ? base + AW'(qaddr(bx, yy, img_w)) : '0;
    end
  end

  logic       v1, x0p, y0p;
  logic [3:0] fr1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; fr1 <= '0; x0p <= 1'b0; y0p <= 1'b0; end
    else begin v1 <= in_valid; fr1 <= fr; x0p <= x0[0]; y0p <= yy[0]; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin out_valid <= 1'b0; pix <= '0; end
    else begin
      logic [PIX_W-1:0] a, b;
      a = rdata[{y0p, x0p}];
      b = rdata[{y0p, ~x0p}];
      out_valid <= v1;
      pix <= PIX_W'((13'(a) * (5'd16 - 5'(fr1)) + 13'(b) * 13'(fr1) + 13'd8) >> 4);
    end
  end
endmodule
