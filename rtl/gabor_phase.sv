// Gabor bank followed by one CORDIC per orientation: the even/odd responses
// (C_q, S_q) of a raster-scanned image and, CORDIC_LAT = 14 clocks later, their
// phase phi_q = atan2(S_q, C_q) (binary angle) and amplitude rho_q.
// Both outputs carry the center coordinate and the inside-image flag.
// Timing: one pixel per clock; see gabor_bank for the filter latency.
module gabor_phase
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
  // raw responses
  output logic              g_valid,
  output logic              g_inside,
  output logic [CRD_W-1:0]  g_x,
  output logic [CRD_W-1:0]  g_y,
  output gab_t              c [N_ORIENT],
  output gab_t              s [N_ORIENT],
  // phase and amplitude
  output logic              p_valid,
  output logic              p_inside,
  output logic [CRD_W-1:0]  p_x,
  output logic [CRD_W-1:0]  p_y,
  output phase_t            ph  [N_ORIENT],
  output amp_t              amp [N_ORIENT]
);
  localparam int CIT  = 12;
  localparam int CLAT = CIT + 2;

  gabor_bank #(.TAPS(11), .LBW(LBW)) u_gab (
    .clk, .rst_n, .img_w, .img_h, .in_valid, .in_x, .in_y, .in_pix,
    .out_valid(g_valid), .out_inside(g_inside), .out_x(g_x), .out_y(g_y), .c, .s);

  logic pv [N_ORIENT];
  for (genvar q = 0; q < N_ORIENT; q++) begin : g_cor
    cordic #(.IW(GAB_W + 1), .AW(PH_W), .ITER(CIT)) u_c (
      .clk, .rst_n, .in_valid(g_valid), .x(17'(c[q])), .y(17'(s[q])),
      .out_valid(pv[q]), .angle(ph[q]), .mag(amp[q]));
  end

  logic pv_d;
  delay_line #(.W(2 * CRD_W + 2), .N(CLAT)) u_sb (
    .clk, .rst_n, .d({g_valid, g_inside, g_x, g_y}), .q({pv_d, p_inside, p_x, p_y}));
  assign p_valid = pv_d;

  logic unused;
  always_comb begin
    unused = 1'b0;
    for (int q = 0; q < N_ORIENT; q++) unused ^= pv[q];
  end
endmodule
