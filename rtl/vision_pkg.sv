// Shared constants, types and elaboration-time coefficient functions of the
// phase-based vision engine.
//
// The engine computes, from a Gabor filterbank of N_ORIENT = 8 orientations
// (theta_q = q*pi/8) with a 4-pixel period at the finest scale
// (w0 = pi/2 rad/pixel), the local image features, a stereo disparity and a
// three-frame optical flow, coarse to fine over an image pyramid.  These
// numbers follow the source design.  Word widths are this design's choice:
// pixels are 8-bit, Gabor responses 16-bit signed integers, phases are binary
// angles of PH_W bits (2^PH_W = one full turn, so wrapping to ]-pi,pi] is plain
// two's-complement overflow), and disparity/flow are 12-bit signed 8.4 fixed
// point as in the source design.
package vision_pkg;

  localparam int N_ORIENT = 8;
  localparam int PIX_W    = 8;
  localparam int GAB_W    = 16;   // Gabor response width (C_q, S_q)
  localparam int AMP_W    = 18;   // amplitude rho_q
  localparam int PH_W     = 12;   // phase, binary angle
  localparam int EST_W    = 12;   // disparity / flow component, 8.4 fixed point
  localparam int FEAT_W   = 9;    // local feature fields
  localparam int CRD_W    = 16;   // coordinate width
  localparam real PI      = 3.14159265358979323846;

  typedef logic signed [GAB_W-1:0] gab_t;
  typedef logic        [PH_W-1:0]  phase_t;
  typedef logic        [AMP_W-1:0] amp_t;
  typedef logic signed [EST_W-1:0] est_t;

  // Estimate with its validity flag.
  typedef struct packed {
    logic ok;
    est_t v;
  } est_ok_t;

  // Local features of one pixel (9 bits each).
  typedef struct packed {
    logic [FEAT_W-1:0] energy;
    logic [FEAT_W-1:0] orient;
    logic [FEAT_W-1:0] phase;
  } feat_t;

  // Final per-pixel output word: 12 disparity + 24 flow + 27 features = 63 bits.
  typedef struct packed {
    est_t  disp;
    est_t  vx;
    est_t  vy;
    feat_t feat;
  } result_t;

  // ---------------------------------------------------------------------
  // Gabor filter coefficients (computed at elaboration, scale 2^10).
  // The complex filter of orientation q factors into a column filter
  // g(y) exp(j w0 y sin theta_q) and a row filter g(x) exp(j w0 x cos theta_q).
  // ---------------------------------------------------------------------
  localparam int  COEF_SCALE = 1024;
  localparam real SIGMA      = 2.0;
  localparam real W0         = PI / 2.0;   // 4-pixel period

  function automatic int gabor_coef(int q, int tap, int half, bit is_row, bit imag);
    real g, arg, th;
    th  = q * PI / N_ORIENT;
    g   = $exp(-(tap - half) * (tap - half) / (2.0 * SIGMA * SIGMA));
    arg = W0 * (tap - half) * (is_row ? $cos(th) : $sin(th));
    return int'($floor(COEF_SCALE * g * (imag ? $sin(arg) : $cos(arg)) + 0.5));
  endfunction

  // cos/sin of theta_q scaled by 256 (used by the flow solver).
  function automatic int cos256(int q);
    return int'($floor(256.0 * $cos(q * PI / N_ORIENT) + 0.5));
  endfunction
  function automatic int sin256(int q);
    return int'($floor(256.0 * $sin(q * PI / N_ORIENT) + 0.5));
  endfunction

  // cos/sin of 2*theta_q scaled by 256 (orientation tensor, eq. 4).
  function automatic int cos2_256(int q);
    return int'($floor(256.0 * $cos(2.0 * q * PI / N_ORIENT) + 0.5));
  endfunction
  function automatic int sin2_256(int q);
    return int'($floor(256.0 * $sin(2.0 * q * PI / N_ORIENT) + 0.5));
  endfunction

  // Phase difference (binary angle) to disparity in 1/16 pixel:
  //   delta = dphi * 2pi/2^PH_W / (w0 cos theta_q) pixels
  // returned as a multiplier scaled by 2^16.  Zero for the vertical filter.
  function automatic int disp_recip(int q);
    real c;
    c = $cos(q * PI / N_ORIENT);
    if (c < 0.01 && c > -0.01) return 0;
    return int'($floor(65536.0 * 16.0 * 2.0 * PI / (2.0 ** PH_W) / (W0 * c) + 0.5));
  endfunction

  // CORDIC arctangent table: atan(2^-i) as a binary angle of 'aw' bits.
  function automatic int atan_tab(int i, int aw);
    return int'($floor($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** aw) + 0.5));
  endfunction

  // Address of pixel (x, y) of an image of width w inside one of the four
  // parity banks (bank = {y[0], x[0]}), relative to the image's base.
  function automatic logic [31:0] qaddr(logic [CRD_W-1:0] x, logic [CRD_W-1:0] y,
                                        logic [CRD_W-1:0] w);
    return 32'(y >> 1) * 32'(w >> 1) + 32'(x >> 1);
  endfunction

  // Code stored in a 12-bit estimate field of the result word when the
  // estimate is invalid.
  localparam logic signed [EST_W-1:0] EST_INVALID = -12'sd2048;

  // Start of pyramid level 'lvl' inside each of the four banks of a
  // quad_ram holding a w x h image pyramid.
  function automatic int pyr_base(int lvl, int w, int h);
    int b;
    b = 0;
    for (int i = 0; i < lvl; i++) b += ((w >> i) * (h >> i)) / 4;
    return b;
  endfunction

  // Phases of the engine.
  typedef enum logic [1:0] {PH_IDLE, PH_LOAD, PH_BUILD, PH_PROC} eng_phase_t;

endpackage
