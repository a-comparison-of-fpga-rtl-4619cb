// Expansion of a coarser-scale estimate map to the current scale (eq. 9 of
// the phase-based coarse-to-fine scheme): bilinear upsampling followed by a
// multiplication by two.
//
// Coarse sample (i, j) sits at fine position (2i, 2j), matching the pyramid
// subsampling.  A fine pixel with even x and y copies one coarse sample; odd
// coordinates average the two or four neighbours (bilinear with weights 1/2).
// Neighbours beyond the coarse image edge are left out.  Each of NL lanes
// (disparity, vx, vy) carries a validity flag; invalid samples are left out
// of the average and the result is invalid only when no sample is valid - a
// choice of this design.  The coarse map is stored in a quad_ram, so the 2x2
// neighbourhood is read in one clock (one address per parity bank).
//
// Timing: raddr is combinational from (x, y); the memory answers one clock
// later; the result is registered: latency 2 clocks, one pixel per clock.
// With prior_en low the output is all-invalid (coarsest scale).
module pyramid_expand
  import vision_pkg::*;
#(
  parameter int NL = 3,
  parameter int AW = 17
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prior_en,
  input  logic [CRD_W-1:0]         cw,      // coarse width
  input  logic [CRD_W-1:0]         ch,      // coarse height
  input  logic                     in_valid,
  input  logic [CRD_W-1:0]         x,
  input  logic [CRD_W-1:0]         y,
  output logic [AW-1:0]            raddr [4],
  input  logic [NL*(EST_W+1)-1:0]  rdata [4],
  output logic                     out_valid,
  output est_ok_t                  out [NL]
);
  logic [CRD_W-1:0] xc, yc;
  logic             use_b [4];

  always_comb begin
    xc = x >> 1;
    yc = y >> 1;
    if (xc > cw - 1'b1) xc = cw - 1'b1;
    if (yc > ch - 1'b1) yc = ch - 1'b1;
    for (int b = 0; b < 4; b++) begin
      logic [CRD_W-1:0] bx, by;
      logic ux, uy;
      bx = (xc[0] == b[0]) ? xc : xc + 1'b1;
      by = (yc[0] == b[1]) ? yc : yc + 1'b1;
      ux = (bx == xc) || (x[0] && bx < cw && x < {cw, 1'b0});
      uy = (by == yc) || (y[0] && by < ch && y < {ch, 1'b0});
      if (bx >= cw) bx = xc;        // keep the address in range (unused)
      if (by >= ch) by = yc;
      use_b[b] = ux && uy;
      raddr[b] = AW'(qaddr(bx, by, cw));
    end
  end

  logic use_r [4];
  logic v1, en1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; en1 <= 1'b0;
      for (int b = 0; b < 4; b++) use_r[b] <= 1'b0;
    end else begin
      v1 <= in_valid; en1 <= prior_en;
      for (int b = 0; b < 4; b++) use_r[b] <= use_b[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < NL; l++) out[l] <= '0;
    end else begin
      out_valid <= v1;
      for (int l = 0; l < NL; l++) begin
        logic signed [EST_W+3:0] sum;
        logic [2:0] n;
        sum = '0; n = '0;
        for (int b = 0; b < 4; b++) begin
          est_ok_t e;
          e = rdata[b][l*(EST_W+1) +: EST_W+1];
          if (use_r[b] && e.ok) begin
            sum += (EST_W+4)'(e.v);
            n = n + 1'b1;
          end
        end
        if (!en1 || n == 0) out[l] <= '0;
        else begin
          logic signed [EST_W+3:0] avg2;
          // 2 * mean, rounded toward zero
          avg2 = (sum * 2) / $signed({1'b0, n});
          out[l].ok <= 1'b1;
          out[l].v  <= (avg2 > 2047) ? 12'sd2047 : (avg2 < -2048) ? -12'sd2048 : EST_W'(avg2);
        end
      end
    end
  end
endmodule
