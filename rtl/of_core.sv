// Single-scale optical flow core.
//
// Three Gabor banks filter frames t-1, t and t+1 (the outer two already warped
// towards frame t by the flow of the coarser scale, see warp_2d); their
// per-orientation phases and amplitudes go to the three-frame least-squares
// flow solver.  Three frames instead of five is the hardware reduction of the
// source design.  The core is reused for every scale.
//
// Interface: the three pixel streams share the extended-raster coordinate;
// outputs belong to center (out_x, out_y).  vx, vy are the residual flow of
// this scale in 1/16 pixel per frame.
// Timing: one pixel per clock; latency = Gabor latency + 14 + 3 clocks.
module of_core
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
  input  logic [PIX_W-1:0]  pix [3],
  output logic              out_valid,
  output logic              out_inside,
  output logic [CRD_W-1:0]  out_x,
  output logic [CRD_W-1:0]  out_y,
  output est_ok_t           vx,
  output est_ok_t           vy
);
  localparam int SBW = 2 * CRD_W + 1;

  logic             pv [3], pin [3], gv [3], gin [3];
  logic [CRD_W-1:0] px [3], py [3], gx [3], gy [3];
  phase_t           ph  [3][N_ORIENT];
  amp_t             am  [3][N_ORIENT];
  gab_t             c   [3][N_ORIENT];
  gab_t             s   [3][N_ORIENT];

  for (genvar f = 0; f < 3; f++) begin : g_frame
    gabor_phase #(.LBW(LBW)) u_gp (
      .clk, .rst_n, .img_w, .img_h, .in_valid, .in_x, .in_y, .in_pix(pix[f]),
      .g_valid(gv[f]), .g_inside(gin[f]), .g_x(gx[f]), .g_y(gy[f]), .c(c[f]), .s(s[f]),
      .p_valid(pv[f]), .p_inside(pin[f]), .p_x(px[f]), .p_y(py[f]), .ph(ph[f]), .amp(am[f]));
  end

  logic [SBW-1:0] osb;
  of_solver #(.SB(SBW)) u_sol (
    .clk, .rst_n, .in_valid(pv[1]), .in_sb({pin[1], px[1], py[1]}),
    .ph0(ph[0]), .ph1(ph[1]), .ph2(ph[2]), .amp0(am[0]), .amp1(am[1]), .amp2(am[2]),
    .out_valid, .out_sb(osb), .vx, .vy);
  assign {out_inside, out_x, out_y} = osb;

  logic unused;
  always_comb begin
    unused = 1'b0;
    for (int f = 0; f < 3; f++)
      unused ^= ^{gv[f], gin[f], gx[f], gy[f], c[f][0], s[f][0]};
    for (int f = 0; f < 3; f += 2) unused ^= ^{pv[f], pin[f], px[f], py[f]};
  end
endmodule
