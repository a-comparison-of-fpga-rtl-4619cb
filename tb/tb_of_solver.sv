// Testbench for of_solver: phases of three frames are generated from a known
// flow (psi_q = -(vx cos th_q + vy sin th_q) w0 per frame) plus noise; some
// orientations get a strongly non-linear phase (rejected by the tau_l test)
// or a low amplitude.  The reference repeats the unwrapping, the linearity test
// and the least-squares solution in floating point; the flow must agree within
// 2/16 pixel, the validity flag exactly.  Latency 3 clocks.
module tb_of_solver;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, t0 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid = 0, out_valid;
  logic [7:0] in_sb = 0, out_sb;
  phase_t ph0 [N_ORIENT], ph1 [N_ORIENT], ph2 [N_ORIENT];
  amp_t amp0 [N_ORIENT], amp1 [N_ORIENT], amp2 [N_ORIENT];
  est_ok_t vx, vy;
  of_solver #(.SB(8)) dut (.*);

  localparam int NV = 300;
  real ex_x [NV], ex_y [NV];
  bit  ex_ok [NV];
  int  got = 0, n_inval = 0;

  function automatic int wrap(int v);
    return (((v % 4096) + 4096 + 2048) % 4096) - 2048;
  endfunction

  initial begin
    foreach (ph0[q]) begin ph0[q] = 0; ph1[q] = 0; ph2[q] = 0; amp0[q] = 0; amp1[q] = 0; amp2[q] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      real tvx, tvy, a11, a12, a22, b1, b2, det;
      int n;
      tvx = ($urandom_range(0, 300) - 150) / 100.0;
      tvy = ($urandom_range(0, 300) - 150) / 100.0;
      a11 = 0; a12 = 0; a22 = 0; b1 = 0; b2 = 0; n = 0;
      for (int q = 0; q < N_ORIENT; q++) begin
        real c, s, psib;
        int base, p0, p1, p2, d01, d12, e, am;
        bit rel;
        c = $cos(q * 3.14159265358979 / 8.0);
        s = $sin(q * 3.14159265358979 / 8.0);
        psib = -(tvx * c + tvy * s) * 1024.0;
        base = $urandom_range(0, 4095);
        p0 = base - int'($floor(psib + 0.5)) + $urandom_range(0, 20) - 10;
        p1 = base;
        p2 = base + int'($floor(psib + 0.5)) + $urandom_range(0, 20) - 10;
        if ($urandom_range(0, 9) < i % 4 || (i % 7 == 6 && q > 1)) p2 = p2 + 1500 + $urandom_range(0, 400);  // non-linear
        am = ($urandom_range(0, 9) == 0) ? 3 : 100;
        ph0[q] <= 12'(p0); ph1[q] <= 12'(p1); ph2[q] <= 12'(p2);
        amp0[q] <= 18'(100); amp1[q] <= 18'(am); amp2[q] <= 18'(100);
        d01 = wrap(p1 - p0); d12 = wrap(p2 - p1);
        e = d12 - d01;
        rel = (longint'(e) * longint'(e) < longint'(3824973)) && am > 8;
        if (rel) begin
          real b;
          b = -(d01 + d12) / 2.0 / 1024.0;
          a11 += c * c; a12 += c * s; a22 += s * s; b1 += c * b; b2 += s * b; n++;
        end
      end
      det = a11 * a22 - a12 * a12;
      ex_ok[i] = n >= 3;
      if (!ex_ok[i]) n_inval++;
      ex_x[i] = ex_ok[i] ? (a22 * b1 - a12 * b2) / det * 16.0 : 0;
      ex_y[i] = ex_ok[i] ? (a11 * b2 - a12 * b1) / det * 16.0 : 0;
      in_valid <= 1; in_sb <= 8'(i);
      if (i == 0) t0 = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real gx, gy;
    gx = real'($signed(vx.v)); gy = real'($signed(vy.v));
    checks += 3;
    if (vx.ok != ex_ok[got] || vy.ok != ex_ok[got]) begin failures++; $display("%0d ok %0d exp %0d", got, vx.ok, ex_ok[got]); end
    if (ex_ok[got] && (gx - ex_x[got] > 2.0 || ex_x[got] - gx > 2.0 || gy - ex_y[got] > 2.0 || ex_y[got] - gy > 2.0)) begin
      failures++; $display("%0d v (%f,%f) exp (%f,%f)", got, gx, gy, ex_x[got], ex_y[got]);
    end
    if (out_sb != 8'(got)) failures++;
    if (got == 0) begin
      checks++;
      if (cyc - t0 != 3 + 1) begin failures++; $display("latency %0d", cyc - t0); end
    end
    got++;
    if (got == NV) begin
      checks++;
      if (n_inval == 0) begin failures++; $display("no invalid case exercised"); end
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
