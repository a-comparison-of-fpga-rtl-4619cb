// Real-time phase-based low-level vision engine (top level).
//
// From a stream of rectified left/right frames the engine computes, for every
// pixel, a stereo disparity, a two-component optical flow and three local
// image features (energy, orientation, phase), all from the phase of an
// 8-orientation Gabor filterbank, refined coarse to fine over an image
// pyramid.  It follows the FPGA architecture of the source design: one
// single-scale stereo core (two Gabor banks, also producing the local
// features), one single-scale optical flow core (three Gabor banks, three
// frames), both reused for every scale, plus the multiscale units - pyramid
// reduction, expansion with bilinear interpolation, 1D and 2D image warping,
// merge and 3x3 median regularisation - and a memory controller that writes
// the 63-bit per-pixel result to an external SRAM bank shared with the host.
//
// Dataflow of a processing pass at scale L (scan coordinate at clock t0):
//   t0  expansion of the scale L+1 estimates (read port 0 of the old map)
//   t2  warping: right image by the disparity (1D), frames t-1 / t+1 by -u / +u
//       (2D); center frame read unwarped
//   t4  stereo core and optical flow core (flow delayed to match stereo)
//   ... second expansion at the core's output coordinate, merge of residual
//       and prior, 3x3 median of disparity, vx and vy (features ride along),
//       write to the scale-L map and output of the result stream.
// The pyramids and the two ping-pong estimate maps are on-chip quad_rams
// (in the source design the pyramids use external SRAM banks).
//
// Sign conventions: the disparity is x_right - x_left and the flow is the
// displacement from frame t to t+1, both in 1/16 pixel.
//
// Ports: pix_* is the input frame stream (accepted while load_ready);
// res_* is the per-scale result stream (coordinates of scale res_level,
// invalid estimates coded as -2048); the final result of scale 0 is also
// written through the MCU to the SRAM bank (sram_*), two 36-bit words per
// pixel at address 2*(y*W+x); host_* is the host's access port to that bank.
module vision_engine
  import vision_pkg::*;
#(
  parameter int W       = 640,
  parameter int H       = 512,
  parameter int NSCALES = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mclk,
  input  logic                mrst_n,
  // frame input
  input  logic                pix_valid,
  input  logic [PIX_W-1:0]    pix_l,
  input  logic [PIX_W-1:0]    pix_r,
  output logic                load_ready,
  // status
  output eng_phase_t          phase,
  output logic [2:0]          level,
  output logic                frame_done,
  output logic                ovf,
  // result stream
  output logic                res_valid,
  output logic [2:0]          res_level,
  output logic [CRD_W-1:0]    res_x,
  output logic [CRD_W-1:0]    res_y,
  output result_t             res,
  // host access port to the output bank
  input  logic                host_req_valid,
  output logic                host_req_ready,
  input  logic                host_req_we,
  input  logic [19:0]         host_req_addr,
  input  logic [35:0]         host_req_wdata,
  output logic                host_rsp_valid,
  input  logic                host_rsp_ready,
  output logic [35:0]         host_rsp_rdata,
  // SRAM bank (mclk)
  output logic                sram_ce,
  output logic                sram_we,
  output logic [19:0]         sram_addr,
  output logic [35:0]         sram_wdata,
  input  logic [35:0]         sram_rdata
);
  localparam int LBW    = W + 8;
  localparam int PDEPTH = pyr_base(NSCALES, W, H);
  localparam int PAW    = $clog2(PDEPTH);
  localparam int MDEPTH = (W / 2) * (H / 2) / 4;
  localparam int MAW    = $clog2(MDEPTH);
  localparam int MDW    = 3 * (EST_W + 1);
  localparam int LAT_ST = 4 + 30;      // stereo core after the Gabor bank
  localparam int LAT_OF = 4 + 17;      // optical flow core after the Gabor bank

  // ---------------------------------------------------------------------
  // sequencing
  // ---------------------------------------------------------------------
  logic             load_we, scan_v;
  logic [CRD_W-1:0] lw, lh, load_x, load_y, scan_x, scan_y;
  logic [1:0]       slot_l, nframes;
  logic             slot_r;

  scale_sequencer #(.W(W), .H(H), .NSCALES(NSCALES)) u_seq (
    .clk, .rst_n, .pix_valid, .phase, .level, .lw, .lh, .load_we, .load_x, .load_y,
    .scan_valid(scan_v), .scan_x, .scan_y, .slot_l, .slot_r, .nframes, .frame_done);

  assign load_ready = phase == PH_LOAD;

  logic [PAW-1:0] base_cur, base_next;
  always_comb begin
    base_cur  = '0;
    base_next = '0;
    for (int l = 0; l < NSCALES; l++) begin
      if (int'(level) == l) base_cur = PAW'(pyr_base(l, W, H));
      if (int'(level) + 1 == l) base_next = PAW'(pyr_base(l, W, H));
    end
  end

  wire build = phase == PH_BUILD;
  wire proc  = phase == PH_PROC;

  // ---------------------------------------------------------------------
  // pyramid stores: left slots 0..2, right slots 0..1
  // ---------------------------------------------------------------------
  logic           pw_we  [5];
  logic [1:0]     pw_bank[5];
  logic [PAW-1:0] pw_addr[5];
  logic [7:0]     pw_data[5];
  logic [PAW-1:0] pr_addr[5][1][4];
  logic [7:0]     pr_data[5][1][4];

  for (genvar i = 0; i < 5; i++) begin : g_pyr
    quad_ram #(.DW(PIX_W), .DEPTH(PDEPTH), .NR(1)) u_pyr (
      .clk, .we(pw_we[i]), .wbank(pw_bank[i]), .waddr(pw_addr[i]), .wdata(pw_data[i]),
      .raddr(pr_addr[i]), .rdata(pr_data[i]));
  end

  // roles of the left slots during processing
  logic [1:0] s_next, s_ctr, s_prev;
  logic       s_rc;
  always_comb begin
    s_next = slot_l;
    s_ctr  = (slot_l == 2'd0) ? 2'd2 : slot_l - 1'b1;
    s_prev = (s_ctr  == 2'd0) ? 2'd2 : s_ctr  - 1'b1;
    s_rc   = ~slot_r;
  end

  // ---- pyramid build: reduction of the newest left and right pyramids ------
  logic             rd_v;
  logic [CRD_W-1:0] rd_x, rd_y;
  logic             red_v  [2];
  logic [CRD_W-1:0] red_x  [2], red_y [2];
  logic [PIX_W-1:0] red_pix[2], red_in [2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin rd_v <= 1'b0; rd_x <= '0; rd_y <= '0; end
    else begin rd_v <= scan_v && build; rd_x <= scan_x; rd_y <= scan_y; end
  end
  assign red_in[0] = pr_data[slot_l][0][{rd_y[0], rd_x[0]}];
  assign red_in[1] = pr_data[3 + int'(slot_r)][0][{rd_y[0], rd_x[0]}];

  for (genvar k = 0; k < 2; k++) begin : g_red
    pyramid_reduce #(.LBW(LBW)) u_red (
      .clk, .rst_n, .img_w(lw), .img_h(lh), .in_valid(rd_v), .in_x(rd_x), .in_y(rd_y),
      .in_pix(red_in[k]), .out_valid(red_v[k]), .out_x(red_x[k]), .out_y(red_y[k]),
      .out_pix(red_pix[k]));
  end

  // ---------------------------------------------------------------------
  // estimate maps (ping-pong): scale L writes map L%2, reads map (L+1)%2
  // ---------------------------------------------------------------------
  logic           mw_we  [2];
  logic [1:0]     mw_bank;
  logic [MAW-1:0] mw_addr;
  logic [MDW-1:0] mw_data;
  logic [MAW-1:0] mr_addr [2][4];
  logic [MDW-1:0] mr_data [2][2][4];
  logic [MDW-1:0] prior_rd [2][4];

  for (genvar m = 0; m < 2; m++) begin : g_map
    quad_ram #(.DW(MDW), .DEPTH(MDEPTH), .NR(2)) u_map (
      .clk, .we(mw_we[m]), .wbank(mw_bank), .waddr(mw_addr), .wdata(mw_data),
      .raddr(mr_addr), .rdata(mr_data[m]));
  end

  logic rsel_q;   // map read during the previous clock
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rsel_q <= 1'b0; else rsel_q <= ~level[0];
  always_comb
    for (int r = 0; r < 2; r++)
      for (int b = 0; b < 4; b++) prior_rd[r][b] = mr_data[rsel_q][r][b];

  wire              prior_en = int'(level) < NSCALES - 1;
  wire [CRD_W-1:0]  cw = lw >> 1;
  wire [CRD_W-1:0]  ch = lh >> 1;

  // ---------------------------------------------------------------------
  // processing pass: expansion (t0..t2), warping (t2..t4)
  // ---------------------------------------------------------------------
  logic    ex_v;
  est_ok_t ex_val [3];
  pyramid_expand #(.NL(3), .AW(MAW)) u_expA (
    .clk, .rst_n, .prior_en, .cw, .ch, .in_valid(scan_v && proc), .x(scan_x), .y(scan_y),
    .raddr(mr_addr[0]), .rdata(prior_rd[0]), .out_valid(ex_v), .out(ex_val));

  logic [CRD_W-1:0] x2, y2, x4, y4;
  delay_line #(.W(2 * CRD_W), .N(2)) u_d2 (.clk, .rst_n, .d({scan_x, scan_y}), .q({x2, y2}));
  delay_line #(.W(2 * CRD_W), .N(2)) u_d4 (.clk, .rst_n, .d({x2, y2}), .q({x4, y4}));

  // negated flow for frame t-1
  est_ok_t nux, nuy;
  always_comb begin
    nux.ok = ex_val[1].ok; nux.v = -ex_val[1].v;
    nuy.ok = ex_val[2].ok; nuy.v = -ex_val[2].v;
  end

  logic [PAW-1:0]   wr_addr [4], wp_addr [4], wn_addr [4];
  logic [PIX_W-1:0] wr_pix, wp_pix, wn_pix, ctr_pix;
  logic             wr_v, wp_v, wn_v;

  warp_1d #(.AW(PAW)) u_warp_r (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .base(base_cur), .in_valid(ex_v),
    .x(x2), .y(y2), .d(ex_val[0]), .raddr(wr_addr), .rdata(pr_data[3 + int'(s_rc)][0]),
    .out_valid(wr_v), .pix(wr_pix));
  warp_2d #(.AW(PAW)) u_warp_p (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .base(base_cur), .in_valid(ex_v),
    .x(x2), .y(y2), .ux(nux), .uy(nuy), .raddr(wp_addr), .rdata(pr_data[s_prev][0]),
    .out_valid(wp_v), .pix(wp_pix));
  warp_2d #(.AW(PAW)) u_warp_n (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .base(base_cur), .in_valid(ex_v),
    .x(x2), .y(y2), .ux(ex_val[1]), .uy(ex_val[2]), .raddr(wn_addr), .rdata(pr_data[s_next][0]),
    .out_valid(wn_v), .pix(wn_pix));

  // unwarped center frame
  logic [PAW-1:0] ctr_addr;
  logic [1:0]     ctr_bank;
  always_comb ctr_addr = base_cur + PAW'(qaddr(x2, y2, lw));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin ctr_bank <= '0; ctr_pix <= '0; end
    else begin
      ctr_bank <= {y2[0], x2[0]};
      ctr_pix  <= pr_data[s_ctr][0][ctr_bank];
    end
  end

  // read address multiplexing of the pyramid stores
  always_comb begin
    for (int i = 0; i < 5; i++)
      for (int b = 0; b < 4; b++) pr_addr[i][0][b] = '0;
    if (build) begin
      for (int b = 0; b < 4; b++) begin
        pr_addr[slot_l][0][b]            = base_cur + PAW'(qaddr(scan_x < lw ? scan_x : lw - 1'b1,
                                                                  scan_y < lh ? scan_y : lh - 1'b1, lw));
        pr_addr[3 + int'(slot_r)][0][b]  = pr_addr[slot_l][0][b];
      end
    end else begin
      pr_addr[s_prev][0]        = wp_addr;
      pr_addr[s_next][0]        = wn_addr;
      pr_addr[3 + int'(s_rc)][0] = wr_addr;
      for (int b = 0; b < 4; b++) pr_addr[s_ctr][0][b] = ctr_addr;
    end
  end

  // write multiplexing: frame load (level 0) or reduction (level L+1)
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      pw_we[i] = 1'b0; pw_bank[i] = '0; pw_addr[i] = '0; pw_data[i] = '0;
    end
    if (load_we) begin
      pw_we[slot_l] = 1'b1;
      pw_bank[slot_l] = {load_y[0], load_x[0]};
      pw_addr[slot_l] = PAW'(qaddr(load_x, load_y, CRD_W'(W)));
      pw_data[slot_l] = pix_l;
      pw_we[3 + int'(slot_r)]   = 1'b1;
      pw_bank[3 + int'(slot_r)] = {load_y[0], load_x[0]};
      pw_addr[3 + int'(slot_r)] = PAW'(qaddr(load_x, load_y, CRD_W'(W)));
      pw_data[3 + int'(slot_r)] = pix_r;
    end else if (build) begin
      pw_we[slot_l]   = red_v[0];
      pw_bank[slot_l] = {red_y[0][0], red_x[0][0]};
      pw_addr[slot_l] = base_next + PAW'(qaddr(red_x[0], red_y[0], lw >> 1));
      pw_data[slot_l] = red_pix[0];
      pw_we[3 + int'(slot_r)]   = red_v[1];
      pw_bank[3 + int'(slot_r)] = {red_y[1][0], red_x[1][0]};
      pw_addr[3 + int'(slot_r)] = base_next + PAW'(qaddr(red_x[1], red_y[1], lw >> 1));
      pw_data[3 + int'(slot_r)] = red_pix[1];
    end
  end

  // ---------------------------------------------------------------------
  // single-scale cores (t4)
  // ---------------------------------------------------------------------
  logic             st_v, st_in;
  logic [CRD_W-1:0] st_x, st_y;
  est_ok_t          st_disp;
  feat_t            st_feat;
  stereo_core #(.LBW(LBW)) u_stereo (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .in_valid(wr_v), .in_x(x4), .in_y(y4),
    .pix_l(ctr_pix), .pix_r(wr_pix), .out_valid(st_v), .out_inside(st_in),
    .out_x(st_x), .out_y(st_y), .disp(st_disp), .feat(st_feat));

  logic             of_v, of_in;
  logic [CRD_W-1:0] of_x, of_y;
  est_ok_t          of_vx, of_vy, of_vx_d, of_vy_d;
  logic [PIX_W-1:0] of_pix [3];
  assign of_pix = '{wp_pix, ctr_pix, wn_pix};
  of_core #(.LBW(LBW)) u_of (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .in_valid(wr_v), .in_x(x4), .in_y(y4),
    .pix(of_pix), .out_valid(of_v), .out_inside(of_in), .out_x(of_x), .out_y(of_y),
    .vx(of_vx), .vy(of_vy));
  delay_line #(.W(2 * (EST_W + 1)), .N(LAT_ST - LAT_OF)) u_dof (
    .clk, .rst_n, .d({of_vx, of_vy}), .q({of_vx_d, of_vy_d}));

  // ---------------------------------------------------------------------
  // merge with the expanded coarser estimate at the core's output coordinate
  // ---------------------------------------------------------------------
  logic    exb_v;
  est_ok_t exb_val [3];
  pyramid_expand #(.NL(3), .AW(MAW)) u_expB (
    .clk, .rst_n, .prior_en, .cw, .ch, .in_valid(st_v), .x(st_x), .y(st_y),
    .raddr(mr_addr[1]), .rdata(prior_rd[1]), .out_valid(exb_v), .out(exb_val));

  logic             c2_v, c2_in;
  logic [CRD_W-1:0] c2_x, c2_y;
  est_ok_t          c2_d, c2_vx, c2_vy;
  feat_t            c2_f;
  delay_line #(.W(2 + 2 * CRD_W + 3 * (EST_W + 1) + 3 * FEAT_W), .N(2)) u_dc (
    .clk, .rst_n, .d({st_v, st_in, st_x, st_y, st_disp, of_vx_d, of_vy_d, st_feat}),
    .q({c2_v, c2_in, c2_x, c2_y, c2_d, c2_vx, c2_vy, c2_f}));

  est_ok_t mg_d, mg_vx, mg_vy;
  merge_unit u_mg_d  (.clk, .rst_n, .res(c2_d),  .prior(exb_val[0]), .sum(mg_d));
  merge_unit u_mg_vx (.clk, .rst_n, .res(c2_vx), .prior(exb_val[1]), .sum(mg_vx));
  merge_unit u_mg_vy (.clk, .rst_n, .res(c2_vy), .prior(exb_val[2]), .sum(mg_vy));

  logic             m_v, m_in;
  logic [CRD_W-1:0] m_x, m_y;
  feat_t            m_f;
  delay_line #(.W(2 + 2 * CRD_W + 3 * FEAT_W), .N(1)) u_dm (
    .clk, .rst_n, .d({c2_v, c2_in, c2_x, c2_y, c2_f}), .q({m_v, m_in, m_x, m_y, m_f}));

  // ---------------------------------------------------------------------
  // 3x3 median regularisation (features ride with the disparity median)
  // ---------------------------------------------------------------------
  logic             md_v, md_in, mx_v, mx_in, my_v, my_in;
  logic [CRD_W-1:0] md_x, md_y, mx_x, mx_y, my_x, my_y;
  est_ok_t          md_d, md_vx, md_vy;
  feat_t            md_f;
  logic [0:0]       aux_x, aux_y;

  median3x3 #(.LBW(LBW), .AUXW(3 * FEAT_W)) u_med_d (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .in_valid(m_v), .in_x(m_x), .in_y(m_y),
    .in_ok(mg_d.ok), .in_d(mg_d.v), .in_aux(m_f),
    .out_valid(md_v), .out_inside(md_in), .out_x(md_x), .out_y(md_y),
    .out_ok(md_d.ok), .out_d(md_d.v), .out_aux(md_f));
  median3x3 #(.LBW(LBW), .AUXW(1)) u_med_x (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .in_valid(m_v), .in_x(m_x), .in_y(m_y),
    .in_ok(mg_vx.ok), .in_d(mg_vx.v), .in_aux(1'b0),
    .out_valid(mx_v), .out_inside(mx_in), .out_x(mx_x), .out_y(mx_y),
    .out_ok(md_vx.ok), .out_d(md_vx.v), .out_aux(aux_x));
  median3x3 #(.LBW(LBW), .AUXW(1)) u_med_y (
    .clk, .rst_n, .img_w(lw), .img_h(lh), .in_valid(m_v), .in_x(m_x), .in_y(m_y),
    .in_ok(mg_vy.ok), .in_d(mg_vy.v), .in_aux(1'b0),
    .out_valid(my_v), .out_inside(my_in), .out_x(my_x), .out_y(my_y),
    .out_ok(md_vy.ok), .out_d(md_vy.v), .out_aux(aux_y));

  wire out_now = md_v && md_in && proc;

  // write the estimate of this scale for the next (finer) one
  always_comb begin
    mw_bank = {md_y[0], md_x[0]};
    mw_addr = MAW'(qaddr(md_x, md_y, lw));
    mw_data = {md_vy, md_vx, md_d};   // layer l of the map = ex_val[l]
    mw_we[0] = out_now && level != 0 && !level[0];
    mw_we[1] = out_now && level[0];
  end

  // ---------------------------------------------------------------------
  // result stream and output bank
  // ---------------------------------------------------------------------
  function automatic est_t code(input est_ok_t e);
    return e.ok ? e.v : EST_INVALID;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0; res_level <= '0; res_x <= '0; res_y <= '0; res <= '0;
    end else begin
      res_valid <= out_now;
      res_level <= level;
      res_x     <= md_x;
      res_y     <= md_y;
      res.disp  <= code(md_d);
      res.vx    <= code(md_vx);
      res.vy    <= code(md_vy);
      res.feat  <= md_f;
    end
  end

  logic          aap_v  [2], aap_rdy [2], aap_we [2], aap_two [2], rsp_v [2], rsp_rdy [2];
  logic [19:0]   aap_a  [2];
  logic [71:0]   aap_d  [2];
  logic [35:0]   rsp_d  [2];

  always_comb begin
    aap_v[0]   = res_valid && res_level == 3'd0;
    aap_we[0]  = 1'b1;
    aap_two[0] = 1'b1;
    aap_a[0]   = 20'(2 * (32'(res_y) * W + 32'(res_x)));
    aap_d[0]   = {9'd0, res.feat, res.disp, res.vx, res.vy};
    rsp_rdy[0] = 1'b1;
    aap_v[1]   = host_req_valid;
    aap_we[1]  = host_req_we;
    aap_two[1] = 1'b0;
    aap_a[1]   = host_req_addr;
    aap_d[1]   = {36'd0, host_req_wdata};
    rsp_rdy[1] = host_rsp_ready;
  end
  assign host_req_ready = aap_rdy[1];
  assign host_rsp_valid = rsp_v[1];
  assign host_rsp_rdata = rsp_d[1];

  mcu #(.NPORT(2), .AW(20), .DWM(36)) u_mcu (
    .clk, .rst_n, .mclk, .mrst_n,
    .req_valid(aap_v), .req_ready(aap_rdy), .req_we(aap_we), .req_two(aap_two),
    .req_addr(aap_a), .req_wdata(aap_d), .rsp_valid(rsp_v), .rsp_ready(rsp_rdy),
    .rsp_rdata(rsp_d), .sram_ce, .sram_we, .sram_addr, .sram_wdata, .sram_rdata);

  // a result word that finds its AAP full is lost: sticky overflow flag
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ovf <= 1'b0;
    else if (aap_v[0] && !aap_rdy[0]) ovf <= 1'b1;

  logic unused;
  assign unused = ^{nframes, mx_v, mx_in, mx_x, mx_y, my_v, my_in, my_x, my_y, aux_x, aux_y,
                    of_v, of_in, of_x, of_y, wp_v, wn_v, exb_v, rsp_v[0], rsp_d[0]};
endmodule
