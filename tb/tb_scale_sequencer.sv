// Testbench for scale_sequencer on a 16x8 frame with three scales.  Five
// frames are streamed.  For every frame it checks the phase order
// (LOAD, BUILD of levels 0..NSCALES-2, then PROC of levels NSCALES-1..0 once
// three frames are stored), the number of scan clocks of each pass
// ((w + margin) * (h + margin)), the raster order of the load coordinates,
// lw/lh of each level, the slot rotation (left slots modulo 3, right slots
// modulo 2), nframes saturating at 3 and one frame_done per processed frame.
// The length of a processed frame is compared with the count worked out from
// the pass sizes and the drain time.
module tb_scale_sequencer;
  import vision_pkg::*;
  localparam int W = 16, H = 8, NS = 3, MB = 2, MP = 6, DR = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic pix_valid = 0, load_we, scan_valid, slot_r, frame_done;
  eng_phase_t phase;
  logic [2:0] level;
  logic [1:0] slot_l, nframes;
  logic [CRD_W-1:0] lw, lh, load_x, load_y, scan_x, scan_y;
  scale_sequencer #(.W(W), .H(H), .NSCALES(NS), .MARGIN_B(MB), .MARGIN_P(MP), .DRAIN(DR)) dut (.*);

  int nscan [2][NS];        // [build/proc][level]
  int nload = 0, ndone = 0, fr = 0, t_fr = 0;
  logic [1:0] sl0;
  logic sr0;
  eng_phase_t ph_q = PH_LOAD;
  string trace = "", exp_trace;

  function automatic int passes_len(int proc);
    int n;
    n = W * H;
    for (int l = 0; l + 1 < NS; l++) n += ((W >> l) + MB) * ((H >> l) + MB) + DR + 1;
    if (proc) for (int l = 0; l < NS; l++) n += ((W >> l) + MP) * ((H >> l) + MP) + DR + 1;
    return n;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pix_valid = 1;
    repeat (6 * passes_len(1)) @(posedge clk);
  end

  always @(posedge clk) if (rst_n) begin
    ph_q <= phase;
    if (frame_done) ndone++;
    if (scan_valid && scan_x == 0 && scan_y == 0)
      trace = {trace, $sformatf("%s%0d ", phase == PH_BUILD ? "B" : "P", level)};
    if (load_we) begin
      checks++;
      if (int'(load_x) != nload % W || int'(load_y) != nload / W) begin
        failures++; $display("load coordinate %0d,%0d at %0d", load_x, load_y, nload);
      end
      nload++;
      if (nload == W * H) begin
        nload = 0; t_fr = cyc; sl0 = slot_l; sr0 = slot_r;
      end
    end
    if (scan_valid) begin
      nscan[phase == PH_PROC][level]++;
      if (scan_x == 0 && scan_y == 0) begin
        checks++;
        if (int'(lw) != (W >> level) || int'(lh) != (H >> level)) begin failures++; $display("lw/lh %0d %0d", lw, lh); end
      end
    end
    // end of a frame: back to LOAD
    if (ph_q != PH_LOAD && phase == PH_LOAD) begin
      int proc;
      fr++;
      proc = fr >= 3;
      exp_trace = "";
      for (int l = 0; l + 1 < NS; l++) exp_trace = {exp_trace, $sformatf("B%0d ", l)};
      if (proc) for (int l = NS - 1; l >= 0; l--) exp_trace = {exp_trace, $sformatf("P%0d ", l)};
      checks += 5;
      if (trace != exp_trace) begin failures++; $display("frame %0d passes '%s' exp '%s'", fr, trace, exp_trace); end
      for (int l = 0; l < NS; l++) begin
        int eb, ep;
        eb = (l + 1 < NS) ? ((W >> l) + MB) * ((H >> l) + MB) : 0;
        ep = proc ? ((W >> l) + MP) * ((H >> l) + MP) : 0;
        checks++;
        if (nscan[0][l] != eb || nscan[1][l] != ep) begin
          failures++; $display("frame %0d level %0d scans %0d/%0d exp %0d/%0d", fr, l, nscan[0][l], nscan[1][l], eb, ep);
        end
        nscan[0][l] = 0; nscan[1][l] = 0;
      end
      if (slot_l != ((sl0 == 2) ? 2'd0 : sl0 + 1'b1) || slot_r == sr0) begin failures++; $display("slot rotation"); end
      if (int'(nframes) != (fr < 3 ? fr : 3)) begin failures++; $display("nframes %0d", nframes); end
      if (ndone != (fr >= 3 ? fr - 2 : 0)) begin failures++; $display("frame_done count %0d", ndone); end
      if (cyc - t_fr + W * H != passes_len(proc) + 1) begin
        failures++; $display("frame %0d length %0d exp %0d", fr, cyc - t_fr + W * H, passes_len(proc) + 1);
      end
      trace = "";
      if (fr == 5) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
