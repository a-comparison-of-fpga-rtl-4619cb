// Testbench for phase_disparity: random left/right phases and amplitudes
// (some below threshold); the expected disparity is computed in floating
// point per orientation as wrap(phl - phr)*2pi/4096 / (pi/2 cos th_q) * 16,
// invalid orientations (vertical filter, low amplitude) are dropped and the
// lower median of the rest is taken; result within 1/16 pixel, validity
// (>= 3 orientations) exact, latency 9 clocks.
module tb_phase_disparity;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, t0 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid = 0, out_valid;
  logic [7:0] in_sb = 0, out_sb;
  phase_t phl [N_ORIENT], phr [N_ORIENT];
  amp_t ampl [N_ORIENT], ampr [N_ORIENT];
  est_ok_t disp;
  phase_disparity #(.SB(8)) dut (.*);

  localparam int NV = 300;
  real exp_d [NV];
  bit  exp_ok [NV];
  int  got = 0;

  initial begin
    foreach (phl[q]) begin phl[q] = 0; phr[q] = 0; ampl[q] = 0; ampr[q] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      real vals [$];
      real dtrue;
      vals.delete();
      dtrue = ($urandom_range(0, 200) - 100) / 100.0;   // +-1 pixel
      for (int q = 0; q < N_ORIENT; q++) begin
        int pl, dp, al, ar;
        real cq;
        cq = $cos(q * 3.14159265358979 / 8.0);
        pl = $urandom_range(0, 4095);
        // phase shift of a true disparity plus noise
        dp = int'($floor(dtrue * 1024.0 * cq + 0.5)) + $urandom_range(0, 60) - 30;
        al = $urandom_range(0, 100);
        ar = $urandom_range(0, 100);
        if (i % 5 == 0) begin al = 100; ar = 100; end
        phl[q] <= 12'(pl); phr[q] <= 12'(pl - dp);
        ampl[q] <= 18'(al); ampr[q] <= 18'(ar);
        if (q != 4 && al > 8 && ar > 8) begin
          int w;
          w = (((dp % 4096) + 4096 + 2048) % 4096) - 2048;
          vals.push_back(real'(w) / (1024.0 * cq) * 16.0);
        end
      end
      vals.sort();
      exp_ok[i] = vals.size() >= 3;
      exp_d[i]  = vals.size() > 0 ? vals[(vals.size() - 1) / 2] : 0.0;
      in_valid <= 1; in_sb <= 8'(i);
      if (i == 0) t0 = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (disp.ok != exp_ok[got]) begin failures++; $display("%0d ok %0d exp %0d", got, disp.ok, exp_ok[got]); end
    if (exp_ok[got] && (real'($signed(disp.v)) - exp_d[got] > 1.0 || exp_d[got] - real'($signed(disp.v)) > 1.0)) begin
      failures++; $display("%0d disp %0d exp %f", got, disp.v, exp_d[got]);
    end
    checks++;
    if (out_sb != 8'(got)) failures++;
    if (got == 0) begin
      checks++;
      if (cyc - t0 != 9 + 1) begin failures++; $display("latency %0d", cyc - t0); end
    end
    got++;
    if (got == NV) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
