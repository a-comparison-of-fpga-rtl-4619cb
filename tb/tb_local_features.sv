// Testbench for local_features: random Gabor responses; energy, orientation
// and phase compared with floating-point evaluations of
//   sqrt(sum C^2+S^2)/64, 1/2 arg(sum rho_q e^{2j th_q}), atan2(sum S, sum C)
// (9-bit codes, within 1 / 8 / 2 steps; random tensors nearly cancel, which makes the orientation ill-conditioned, orientation and phase modulo 512),
// the sideband and the latency of 30 clocks.
module tb_local_features;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, t0 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid = 0, out_valid;
  logic [7:0] in_sb = 0, out_sb;
  gab_t c [N_ORIENT], s [N_ORIENT];
  feat_t feat;
  local_features #(.SB(8)) dut (.*);

  localparam int NV = 200;
  real e_en [NV], e_or [NV], e_ph [NV];
  int got = 0;
  localparam real TWO_PI = 2.0 * 3.14159265358979;

  function automatic int cdist(int a, int b, int m);
    int d;
    d = ((a - b) % m + m) % m;
    return d > m / 2 ? m - d : d;
  endfunction

  initial begin
    foreach (c[q]) begin c[q] = 0; s[q] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      real en, tx, ty, sc, ss, a;
      int amp;
      en = 0; tx = 0; ty = 0; sc = 0; ss = 0;
      amp = (i % 4 == 0) ? 200 : 3000;
      for (int q = 0; q < N_ORIENT; q++) begin
        int cv, sv;
        real rho;
        cv = $urandom_range(0, 2 * amp) - amp;
        sv = $urandom_range(0, 2 * amp) - amp;
        if (i % 3 == 0 && q == i % 8) begin cv = cv * 4; sv = sv * 4; end
        c[q] <= 16'(cv); s[q] <= 16'(sv);
        en += real'(cv) * cv + real'(sv) * sv;
        rho = $sqrt(real'(cv) * cv + real'(sv) * sv);
        tx += rho * $cos(2.0 * q * 3.14159265358979 / 8.0);
        ty += rho * $sin(2.0 * q * 3.14159265358979 / 8.0);
        sc += cv; ss += sv;
      end
      e_en[i] = $sqrt(en) / 64.0;
      if (e_en[i] > 511.0) e_en[i] = 511.0;
      a = $atan2(ty, tx); if (a < 0) a += TWO_PI;
      e_or[i] = a / TWO_PI * 512.0;
      a = $atan2(ss, sc); if (a < 0) a += TWO_PI;
      e_ph[i] = a / TWO_PI * 512.0;
      in_valid <= 1; in_sb <= 8'(i);
      if (i == 0) t0 = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 4;
    if (out_sb != 8'(got)) begin failures++; $display("sideband %0d vs %0d", out_sb, got); end
    if (int'(feat.energy) - int'($floor(e_en[got])) > 1 || int'($floor(e_en[got])) - int'(feat.energy) > 1) begin
      failures++; $display("%0d energy %0d exp %f", got, feat.energy, e_en[got]);
    end
    if (cdist(int'(feat.orient), int'($floor(e_or[got] + 0.5)), 512) > 8) begin
      failures++; $display("%0d orient %0d exp %f", got, feat.orient, e_or[got]);
    end
    if (cdist(int'(feat.phase), int'($floor(e_ph[got] + 0.5)), 512) > 2) begin
      failures++; $display("%0d phase %0d exp %f", got, feat.phase, e_ph[got]);
    end
    if (got == 0) begin
      checks++;
      if (cyc - t0 != 30 + 1) begin failures++; $display("latency %0d", cyc - t0); end
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
