// Single-scale stereo core with local features.
//
// Two Gabor banks filter the left image and the right image (the latter
// already warped by the disparity of the coarser scale, see warp_1d).  The
// left responses feed the local-features unit (energy, orientation, phase);
// the per-orientation phases and amplitudes of both images feed the
// phase-difference disparity unit.  The disparity is delayed to leave together
// with the features.  The same core is reused for every scale; the sharing of
// the left Gabor bank with the local features follows the source design.
//
// Interface: both pixel streams share the extended-raster coordinate
// (in_x, in_y); outputs belong to center (out_x, out_y) with out_inside set
// for centers in the image.  disp is the residual disparity of this scale in
// 1/16 pixel (before merging with the coarser estimate).
// Timing: one pixel per clock; latency = Gabor latency + LAT_POST (30).
module stereo_core
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
  input  logic [PIX_W-1:0]  pix_l,
  input  logic [PIX_W-1:0]  pix_r,
  output logic              out_valid,
  output logic              out_inside,
  output logic [CRD_W-1:0]  out_x,
  output logic [CRD_W-1:0]  out_y,
  output est_ok_t           disp,
  output feat_t             feat
);
  localparam int LAT_LF = 30;          // local_features latency
  localparam int LAT_PD = 14 + 9;      // cordic + phase_disparity
  localparam int SBW    = 2 * CRD_W + 1;

  logic gv_l, gi_l, pv_l, pi_l;
  logic [CRD_W-1:0] gx_l, gy_l, px_l, py_l;
  gab_t   c_l [N_ORIENT], s_l [N_ORIENT];
  phase_t ph_l [N_ORIENT];
  amp_t   am_l [N_ORIENT];

  logic gv_r, gi_r, pv_r, pi_r;
  logic [CRD_W-1:0] gx_r, gy_r, px_r, py_r;
  gab_t   c_r [N_ORIENT], s_r [N_ORIENT];
  phase_t ph_r [N_ORIENT];
  amp_t   am_r [N_ORIENT];

  gabor_phase #(.LBW(LBW)) u_left (
    .clk, .rst_n, .img_w, .img_h, .in_valid, .in_x, .in_y, .in_pix(pix_l),
    .g_valid(gv_l), .g_inside(gi_l), .g_x(gx_l), .g_y(gy_l), .c(c_l), .s(s_l),
    .p_valid(pv_l), .p_inside(pi_l), .p_x(px_l), .p_y(py_l), .ph(ph_l), .amp(am_l));

  gabor_phase #(.LBW(LBW)) u_right (
    .clk, .rst_n, .img_w, .img_h, .in_valid, .in_x, .in_y, .in_pix(pix_r),
    .g_valid(gv_r), .g_inside(gi_r), .g_x(gx_r), .g_y(gy_r), .c(c_r), .s(s_r),
    .p_valid(pv_r), .p_inside(pi_r), .p_x(px_r), .p_y(py_r), .ph(ph_r), .amp(am_r));

  // local features of the left image
  logic lf_v;
  logic [SBW-1:0] lf_sb;
  local_features #(.SB(SBW)) u_lf (
    .clk, .rst_n, .in_valid(gv_l), .in_sb({gi_l, gx_l, gy_l}), .c(c_l), .s(s_l),
    .out_valid(lf_v), .out_sb(lf_sb), .feat);

  // disparity, then retimed to the features
  logic pd_v, pd_v_d;
  logic [SBW-1:0] pd_sb_unused;
  est_ok_t pd_disp;
  phase_disparity #(.SB(SBW)) u_pd (
    .clk, .rst_n, .in_valid(pv_l), .in_sb({pi_l, px_l, py_l}),
    .phl(ph_l), .phr(ph_r), .ampl(am_l), .ampr(am_r),
    .out_valid(pd_v), .out_sb(pd_sb_unused), .disp(pd_disp));
  delay_line #(.W(EST_W + 2), .N(LAT_LF - LAT_PD)) u_dd (
    .clk, .rst_n, .d({pd_v, pd_disp}), .q({pd_v_d, disp}));

  assign out_valid = lf_v;
  assign {out_inside, out_x, out_y} = lf_sb;

  logic unused;
  assign unused = ^{gv_r, gi_r, gx_r, gy_r, pv_r, pi_r, px_r, py_r, pd_v_d, pd_sb_unused,
                    c_r[0], s_r[0]};
endmodule
