// Full-size end-to-end testbench: the vision engine with its default
// parameters (640x512 frames, six scales), same stimulus and checks as
// tb_vision_engine but with three frames (one processed frame).
//
// Stimulus: a synthetic texture (sum of sinusoids) moving by VX px/frame to
// the right; the right image is the left image shifted by DISP px (a point at
// x in the left image is at x - DISP in the right image).  DISP = 3 px and
// VX = 1.5 px exceed what one scale resolves with the 4-pixel Gabor period
// (+-2 px), so the coarse scales, expansion and warping are needed.
// Checked mechanisms (each counted in 'checks'):
//   - frame stream: every pixel accepted while load_ready, frame_done pulses
//     once per processed frame;
//   - per-scale processing: each scale outputs exactly one result per pixel,
//     coarsest scale first;
//   - stereo: most interior pixels of scale 0 give -DISP within 1/2 px (the
//     engine reports the disparity as x_right - x_left);
//   - optical flow: most interior pixels give (VX, 0) within 1/2 px;
//   - local features: energy non-zero on the texture;
//   - median regularisation: the four corners (only 4 of the 9 window samples
//     inside the image, fewer than the 5 required) are coded invalid;
//   - output bank: scale-0 results are written through the MCU into the SRAM
//     model at 2*(y*W+x); every 37th pixel is read back through the host port
//     and compared (both words) with the result stream;
//   - host AAP: host writes and reads of a scratch area issued while the
//     engine is writing results (arbitration between both ports) return the
//     written data;
//   - no AAP overflow; throughput: load + build + processing of the last
//     frame takes fewer than 4.0 clocks per input pixel (about 3.7 expected).
module tb_vision_full;
  import vision_pkg::*;
  localparam int W = 640, H = 512, NS = 6;
  localparam real VX = 1.5, DISP = 3.0;
  localparam int NFR = 3;

  logic clk = 0, rst_n = 0, mclk = 0, mrst_n = 0;
  always #5 clk = ~clk;
  always #2 mclk = ~mclk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic pix_valid = 0, load_ready, frame_done, ovf, res_valid;
  logic [7:0] pix_l = 0, pix_r = 0;
  eng_phase_t phase;
  logic [2:0] level, res_level;
  logic [CRD_W-1:0] res_x, res_y;
  result_t res;
  logic host_req_valid = 0, host_req_ready, host_req_we = 0, host_rsp_valid, host_rsp_ready = 0;
  logic [19:0] host_req_addr = 0;
  logic [35:0] host_req_wdata = 0, host_rsp_rdata;
  logic sram_ce, sram_we;
  logic [19:0] sram_addr;
  logic [35:0] sram_wdata, sram_rdata;

  vision_engine dut (.*);

  // ---- SRAM bank model: synchronous, read data one mclk after the read ----
  logic [35:0] sram [int];
  always @(posedge mclk)
    if (sram_ce) begin
      if (sram_we) sram[int'(sram_addr)] = sram_wdata;
      else sram_rdata <= sram.exists(int'(sram_addr)) ? sram[int'(sram_addr)] : 36'hDEAD;
    end

  // ---- texture -------------------------------------------------------------
  function automatic logic [7:0] tex(real x, real y);
    real v;
    v = 128.0 + 20.0 * $sin(2.0 * 3.14159265 * x / 4.3 + 0.4)
              + 20.0 * $sin(2.0 * 3.14159265 * y / 4.7 + 1.1)
              + 15.0 * $sin(2.0 * 3.14159265 * (x + 0.7 * y) / 5.3)
              + 30.0 * $sin(2.0 * 3.14159265 * (x - 0.4 * y) / 9.1 + 2.0)
              + 30.0 * $sin(2.0 * 3.14159265 * (0.3 * x + y) / 8.3 + 0.7);
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(int'(v));
  endfunction

  // ---- frame stream --------------------------------------------------------
  int fr = 0, k = 0, n_acc = 0;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1; mrst_n = 1;
    for (fr = 0; fr < NFR; fr++) begin
      k = 0;
      if (fr == NFR - 1) t_first = cyc;
      while (k < W * H) begin
        real x, y;
        x = k % W; y = k / W;
        pix_valid <= 1;
        pix_l <= tex(x - VX * fr, y);
        pix_r <= tex(x + DISP - VX * fr, y);
        @(posedge clk);
        if (load_ready) begin k++; n_acc++; end
      end
      pix_valid <= 0;
      @(posedge clk);
      while (!load_ready) @(posedge clk);
    end
  end

  // ---- result stream monitor ---------------------------------------------
  int n_lvl [NS];
  int prev_level = -1, n_done = 0, proc_frame = 0;
  int d_good = 0, d_tot = 0, f_good = 0, f_tot = 0, e_nz = 0, e_tot = 0, border_inv = 0, border_tot = 0;
  int order_err = 0, t_start = 0, t_frame [2], t_first = 0;
  logic [62:0] res0 [W * H];

  always @(posedge clk) if (rst_n) begin
    if (res_valid) begin
      int lw, lh;
      lw = W >> res_level; lh = H >> res_level;
      if (int'(res_level) != prev_level) begin
        if (prev_level >= 0 && int'(res_level) != prev_level - 1 && !(prev_level == 0 && res_level == 3'(NS - 1)))
          order_err++;
        prev_level = int'(res_level);
      end
      n_lvl[res_level]++;
      if (res_level == 0) begin
        res0[int'(res_y) * W + int'(res_x)] = {res.feat, res.disp, res.vx, res.vy};
        if (res_x >= 16 && res_x < W - 16 && res_y >= 16 && res_y < H - 16) begin
          real dd, fx, fy;
          dd = real'($signed(res.disp)) / 16.0;
          fx = real'($signed(res.vx)) / 16.0;
          fy = real'($signed(res.vy)) / 16.0;
          d_tot++; f_tot++; e_tot++;
          if (res.disp != EST_INVALID && dd + DISP < 0.5 && -DISP - dd < 0.5) d_good++;
          if (res.vx != EST_INVALID && fx - VX < 0.5 && VX - fx < 0.5 && fy < 0.5 && fy > -0.5) f_good++;
          if (res.feat.energy != 0) e_nz++;
        end
        if ((res_x == 0 || res_x == W - 1) && (res_y == 0 || res_y == H - 1)) begin
          border_tot++;
          if (res.disp == EST_INVALID) border_inv++;
        end
      end
    end
    if (frame_done) begin
      if (n_done == 0) t_frame[0] = cyc - t_first;
      t_start = cyc;
      n_done++;
      // per-frame checks on the result counts
      for (int l = 0; l < NS; l++) begin
        checks++;
        if (n_lvl[l] != (W >> l) * (H >> l)) begin
          failures++; $display("frame %0d level %0d: %0d results", n_done, l, n_lvl[l]);
        end
        n_lvl[l] = 0;
      end
    end
  end

  // ---- host port: scratch traffic while the engine writes, readback later ---
  localparam int SCR = 20'h80000;
  int host_ok = 0, host_bad = 0, host_during = 0;
  task automatic host_write(int a, logic [35:0] d);
    host_req_valid <= 1; host_req_we <= 1; host_req_addr <= 20'(a); host_req_wdata <= d;
    @(posedge clk);
    while (!host_req_ready) @(posedge clk);
    host_req_valid <= 0;
  endtask
  task automatic host_read(int a, output logic [35:0] d);
    host_req_valid <= 1; host_req_we <= 0; host_req_addr <= 20'(a);
    @(posedge clk);
    while (!host_req_ready) @(posedge clk);
    host_req_valid <= 0;
    while (!host_rsp_valid) @(posedge clk);
    d = host_rsp_rdata;
    host_rsp_ready <= 1;
    @(posedge clk);
    host_rsp_ready <= 0;
    @(posedge clk);
  endtask

  initial begin
    logic [35:0] d;
    int cnt;
    // wait for the scale-0 pass of the first processed frame
    wait (rst_n);
    @(posedge clk);
    while (!(res_valid && res_level == 0)) @(posedge clk);
    cnt = 0;
    for (int i = 0; i < 40; i++) begin
      host_write(SCR + i, 36'(i * 7919 + 5));
      host_read(SCR + i, d);
      if (dut.phase == PH_PROC) host_during++;
      if (d == 36'(i * 7919 + 5)) host_ok++; else host_bad++;
    end
    // end of the run: after the last frame
    wait (n_done == NFR - 2);
    repeat (200) @(posedge clk);
    checks++;
    if (n_acc != NFR * W * H) begin failures++; $display("accepted %0d pixels", n_acc); end
    checks++;
    if (order_err != 0) begin failures++; $display("scale order errors %0d", order_err); end
    checks++;
    if (d_good < d_tot * 7 / 10) begin failures++; end
    $display("disparity: %0d of %0d interior pixels within 0.5 px", d_good, d_tot);
    checks++;
    if (f_good < f_tot * 7 / 10) begin failures++; end
    $display("flow: %0d of %0d interior pixels within 0.5 px", f_good, f_tot);
    checks++;
    if (e_nz < e_tot * 9 / 10) begin failures++; $display("energy nonzero %0d of %0d", e_nz, e_tot); end
    checks++;
    if (border_inv != border_tot) begin failures++; $display("border invalid %0d of %0d", border_inv, border_tot); end
    checks++;
    if (host_bad != 0 || host_during == 0) begin
      failures++; $display("host scratch ok %0d bad %0d during %0d", host_ok, host_bad, host_during);
    end
    checks++;
    if (ovf) begin failures++; $display("AAP overflow"); end
    checks++;
    $display("frame period: %0d clocks (%0.2f per pixel)", t_frame[0], real'(t_frame[0]) / (W * H));
    if (t_frame[0] > 40 * W * H / 10) failures++;
    // read back the scale-0 results of the last frame through the host port
    cnt = 0;
    for (int i = 0; i < W * H; i += 37) begin
      logic [35:0] lo, hi;
      host_read(2 * i, lo);
      host_read(2 * i + 1, hi);
      checks++;
      if ({hi[26:0], lo} != res0[i]) begin
        failures++; cnt++;
        if (cnt < 5) $display("readback %0d: %h%h exp %h", i, hi, lo, res0[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog: frames done %0d", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
