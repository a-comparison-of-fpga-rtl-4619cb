// Local image features from the 8 Gabor responses of one pixel.
//
//   energy : E = sum_q rho_q^2 = sum_q (C_q^2 + S_q^2); output sqrt(E) >> 6,
//            saturated to 9 bits (the scaling is this design's choice).
//   orient : theta = 1/2 arg(sum_q rho_q exp(2j theta_q)); 9 bits covering
//            [0, pi) in steps of pi/512.
//   phase  : phi = atan2(S, C) with the hardware simplification of the source
//            design S = sum_q S_q, C = sum_q C_q (no orientation weighting,
//            which removes the dependence on theta); 9 bits, 512 = full turn.
//
// Each response goes down three paths (energy, orientation, phase) of
// different depth; shorter paths are delayed by delay lines so that all three
// features and the sideband in_sb leave together.  The rho_q come from eight
// CORDIC magnitude units, the angles from two more CORDICs and the energy
// root from an isqrt pipeline, standing in for the vendor cores.
//
// Timing: one pixel per clock, latency LAT = 2*(CORDIC latency) + 2.
module local_features
  import vision_pkg::*;
#(
  parameter int SB = 1      // sideband width carried with the pixel
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [SB-1:0]  in_sb,
  input  gab_t           c [N_ORIENT],
  input  gab_t           s [N_ORIENT],
  output logic           out_valid,
  output logic [SB-1:0]  out_sb,
  output feat_t          feat
);
  localparam int CIT  = 12;
  localparam int CLAT = CIT + 2;           // cordic latency
  localparam int LAT  = 2 * CLAT + 2;      // orientation path, the longest
  localparam int EW   = 36;                // energy width (even for isqrt)
  localparam int SLAT = EW / 2 + 1;        // isqrt latency

  // ---- orientation path: rho_q, tensor sum, angle ------------------------
  amp_t rho [N_ORIENT];
  logic rv  [N_ORIENT];
  for (genvar q = 0; q < N_ORIENT; q++) begin : g_rho
    logic [PH_W-1:0] ang_unused;
    cordic #(.IW(GAB_W + 1), .AW(PH_W), .ITER(CIT)) u_c (
      .clk, .rst_n, .in_valid,
      .x(17'(c[q])), .y(17'(s[q])),
      .out_valid(rv[q]), .angle(ang_unused), .mag(rho[q]));
  end

  logic signed [31:0] tx, ty;
  logic               tv;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin tx <= '0; ty <= '0; tv <= 1'b0; end
    else begin
      logic signed [31:0] ax, ay;
      ax = '0; ay = '0;
      for (int q = 0; q < N_ORIENT; q++) begin
        ax += $signed({14'd0, rho[q]}) * cos2_256(q);
        ay += $signed({14'd0, rho[q]}) * sin2_256(q);
      end
      tx <= ax >>> 8; ty <= ay >>> 8;   // back to amplitude units
      tv <= rv[0];
    end
  end

  logic [PH_W-1:0] th_ang;
  logic [20:0]     th_mag_unused;
  logic            th_v;
  cordic #(.IW(PH_W + 8), .AW(PH_W), .ITER(CIT)) u_orient (
    .clk, .rst_n, .in_valid(tv), .x(20'(tx)), .y(20'(ty)),
    .out_valid(th_v), .angle(th_ang), .mag(th_mag_unused));

  // ---- phase path: atan2(sum S, sum C) ----------------------------------
  logic signed [19:0] sc, ss;
  logic               pv0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin sc <= '0; ss <= '0; pv0 <= 1'b0; end
    else begin
      logic signed [19:0] a, b;
      a = '0; b = '0;
      for (int q = 0; q < N_ORIENT; q++) begin a += 20'(c[q]); b += 20'(s[q]); end
      sc <= a; ss <= b; pv0 <= in_valid;
    end
  end
  logic [PH_W-1:0] ph_ang;
  logic [20:0]     ph_mag_unused;
  logic            ph_v_unused;
  cordic #(.IW(20), .AW(PH_W), .ITER(CIT)) u_phase (
    .clk, .rst_n, .in_valid(pv0), .x(sc), .y(ss),
    .out_valid(ph_v_unused), .angle(ph_ang), .mag(ph_mag_unused));

  // ---- energy path ----------------------------------------------------
  logic [EW-1:0] esum;
  logic          ev0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin esum <= '0; ev0 <= 1'b0; end
    else begin
      logic [EW-1:0] a;
      a = '0;
      for (int q = 0; q < N_ORIENT; q++)
        a += EW'(c[q] * c[q]) + EW'(s[q] * s[q]);
      esum <= a; ev0 <= in_valid;
    end
  end
  logic [EW/2-1:0] eroot;
  logic            ev_unused;
  isqrt #(.W(EW)) u_sqrt (.clk, .rst_n, .in_valid(ev0), .a(esum), .out_valid(ev_unused), .r(eroot));

  // ---- retiming -----------------------------------------------------------
  logic [FEAT_W-1:0] e9, e9d, p9, p9d;
  always_comb begin
    logic [EW/2-1:0] sh;
    sh  = eroot >> 6;
    e9  = (sh > (EW/2)'(511)) ? 9'd511 : sh[FEAT_W-1:0];
    p9  = ph_ang[PH_W-1 -: FEAT_W];
  end
  delay_line #(.W(FEAT_W), .N(LAT - 1 - SLAT)) u_de (.clk, .rst_n, .d(e9), .q(e9d));
  delay_line #(.W(FEAT_W), .N(LAT - 1 - CLAT)) u_dp (.clk, .rst_n, .d(p9), .q(p9d));
  delay_line #(.W(SB + 1), .N(LAT)) u_ds (.clk, .rst_n, .d({in_valid, in_sb}), .q({out_valid, out_sb}));

  // orientation: half the tensor angle, mapped to [0, pi)
  delay_line #(.W(FEAT_W), .N(LAT - 1 - 2 * CLAT)) u_do (
    .clk, .rst_n, .d(th_ang[PH_W-1 -: FEAT_W]), .q(feat.orient));
  assign feat.energy = e9d;
  assign feat.phase  = p9d;

  logic unused;
  assign unused = th_v;
endmodule
