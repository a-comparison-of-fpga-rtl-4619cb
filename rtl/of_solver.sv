// Three-frame phase-based optical flow for one pixel (single scale).
//
// Per orientation q, the phases of frames t-1, t, t+1 (binary angles, the outer
// two already warped towards frame t) give the wrapped differences
// d01 = phi_t - phi_{t-1} and d12 = phi_{t+1} - phi_t; summing them unwraps the
// phase.  A least-squares line through the three phases has slope
// psi = (d01 + d12)/2 and mean squared error (d12 - d01)^2 / 18; a component
// is reliable when that error is below the phase linearity threshold tau_l
// (LIN_THRESH is tau_l = 0.5 rad^2 expressed in squared phase units times 18)
// and the three amplitudes exceed AMP_MIN.  Each reliable component gives the
// constraint vx cos(th_q) + vy sin(th_q) = -psi / w0, and the overdetermined
// system is solved in the least-squares sense through its 2x2 normal
// equations (Cramer's rule, two divisions).  The result is valid when at
// least MIN_COMP components were reliable.  The three-frame fit and tau_l
// follow the source design; AMP_MIN, MIN_COMP and the arithmetic are this
// design's choices.
//
// Output: vx, vy in 1/16 pixel per frame (8.4 fixed point, saturated).
// Timing: one pixel per clock, latency 3 clocks.
module of_solver
  import vision_pkg::*;
#(
  parameter longint LIN_THRESH = 64'd3824973,
  parameter int     MIN_COMP   = 3,
  parameter int     AMP_MIN    = 8,
  parameter int     SB         = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [SB-1:0]  in_sb,
  input  phase_t         ph0  [N_ORIENT],
  input  phase_t         ph1  [N_ORIENT],
  input  phase_t         ph2  [N_ORIENT],
  input  amp_t           amp0 [N_ORIENT],
  input  amp_t           amp1 [N_ORIENT],
  input  amp_t           amp2 [N_ORIENT],
  output logic           out_valid,
  output logic [SB-1:0]  out_sb,
  output est_ok_t        vx,
  output est_ok_t        vy
);
  // ---- stage 1: per-orientation fit ---------------------------------------
  logic signed [PH_W:0] slope2 [N_ORIENT];   // 2*psi
  logic                 rel    [N_ORIENT];
  logic                 v1;
  logic [SB-1:0]        sb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sb1 <= '0;
      for (int q = 0; q < N_ORIENT; q++) begin slope2[q] <= '0; rel[q] <= 1'b0; end
    end else begin
      v1 <= in_valid; sb1 <= in_sb;
      for (int q = 0; q < N_ORIENT; q++) begin
        logic signed [PH_W-1:0] d01, d12;
        logic signed [PH_W:0]   e;
        logic [2*PH_W+1:0]      e2;
        d01 = $signed(ph1[q] - ph0[q]);
        d12 = $signed(ph2[q] - ph1[q]);
        e   = (PH_W+1)'(d12) - (PH_W+1)'(d01);
        e2  = (2*PH_W+2)'(32'(e) * 32'(e));
        slope2[q] <= (PH_W+1)'(d01) + (PH_W+1)'(d12);
        rel[q]    <= 64'(e2) < LIN_THRESH && amp0[q] > AMP_W'(AMP_MIN)
                     && amp1[q] > AMP_W'(AMP_MIN) && amp2[q] > AMP_W'(AMP_MIN);
      end
    end
  end

  // ---- stage 2: normal equations ---------------------------------------
  logic signed [23:0] scc, sss, scs;
  logic signed [27:0] scb, ssb;
  logic [3:0]         n2;
  logic               v2;
  logic [SB-1:0]      sb2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; sb2 <= '0; n2 <= '0;
      scc <= '0; sss <= '0; scs <= '0; scb <= '0; ssb <= '0;
    end else begin
      logic signed [23:0] acc, ass, acs;
      logic signed [27:0] acb, asb;
      logic [3:0] n;
      acc = '0; ass = '0; acs = '0; acb = '0; asb = '0; n = '0;
      for (int q = 0; q < N_ORIENT; q++)
        if (rel[q]) begin
          acc += 24'(cos256(q) * cos256(q));
          ass += 24'(sin256(q) * sin256(q));
          acs += 24'(cos256(q) * sin256(q));
          acb -= 28'(slope2[q] * cos256(q));
          asb -= 28'(slope2[q] * sin256(q));
          n = n + 1'b1;
        end
      v2 <= v1; sb2 <= sb1; n2 <= n;

      scc <= acc; sss <= ass; scs <= acs; scb <= acb; ssb <= asb;
    end
  end

  // ---- stage 3: Cramer's rule --------------------------------------------
  // vx c + vy s = -slope2/8 (c, s scaled by 256); result in 1/16 pixel
  // is 2 * M^-1 [scb; ssb].
  function automatic est_t sat12(input logic signed [63:0] v);
    if (v > 64'sd2047)       return 12'sd2047;
    else if (v < -64'sd2048) return -12'sd2048;
    else                     return EST_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sb <= '0; vx <= '0; vy <= '0;
    end else begin
      logic signed [63:0] det, nx, ny;
      logic ok;
      det = 64'(scc) * 64'(sss) - 64'(scs) * 64'(scs);
      nx  = 2 * (64'(sss) * 64'(scb) - 64'(scs) * 64'(ssb));
      ny  = 2 * (64'(scc) * 64'(ssb) - 64'(scs) * 64'(scb));
      ok  = n2 >= 4'(MIN_COMP) && det > 0;
      out_valid <= v2; out_sb <= sb2;
      vx.ok <= ok; vy.ok <= ok;
      vx.v  <= ok ? sat12(nx / det) : '0;
      vy.v  <= ok ? sat12(ny / det) : '0;
    end
  end
endmodule
