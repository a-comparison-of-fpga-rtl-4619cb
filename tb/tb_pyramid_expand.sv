// Testbench for pyramid_expand: a coarse 8x6 map of three estimate lanes
// (about 20 % invalid, values up to +-1500 so that doubling saturates
// sometimes) sits in a four-bank memory model with registered reads (as in
// quad_ram).  Every fine pixel of a 16x12 scan plus two extra columns and
// rows is expanded; the reference takes the coarse samples covering the
// pixel (one for even coordinates, two or four for odd ones, none beyond the
// coarse edge), averages the valid ones, doubles (truncating toward zero)
// and saturates to 12 bits; no valid sample gives an invalid result.  With
// prior_en low every output must be invalid.  Latency 2 clocks (+1 for
// sampling).
module tb_pyramid_expand;
  import vision_pkg::*;
  localparam int CW = 8, CH = 6, AW = 6, NL = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic prior_en = 1, in_valid = 0, out_valid;
  logic [CRD_W-1:0] cw = CW, ch = CH, x = 0, y = 0;
  logic [AW-1:0] raddr [4];
  logic [NL*(EST_W+1)-1:0] rdata [4];
  est_ok_t out [NL];
  pyramid_expand #(.NL(NL), .AW(AW)) dut (.*);

  int cv [NL][CH][CW];
  bit cok [NL][CH][CW];
  logic [NL*(EST_W+1)-1:0] mem [4][1 << AW];
  always @(posedge clk) for (int b = 0; b < 4; b++) rdata[b] <= mem[b][raddr[b]];

  typedef struct { bit ok [NL]; int v [NL]; int t; } exp_t;
  exp_t q [$];

  initial begin
    foreach (mem[b, a]) mem[b][a] = '0;
    foreach (rdata[b]) rdata[b] = '0;
    for (int j = 0; j < CH; j++)
      for (int i = 0; i < CW; i++) begin
        logic [NL*(EST_W+1)-1:0] w;
        for (int l = 0; l < NL; l++) begin
          est_ok_t e;
          cv[l][j][i] = $urandom_range(0, 3000) - 1500;
          cok[l][j][i] = $urandom_range(0, 4) != 0;
          e.ok = cok[l][j][i]; e.v = 12'(cv[l][j][i]);
          w[l*(EST_W+1) +: EST_W+1] = e;
        end
        mem[{j[0], i[0]}][qaddr(16'(i), 16'(j), 16'(CW))] = w;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++)
      for (int fy = 0; fy < 2 * CH + 2; fy++)
        for (int fx = 0; fx < 2 * CW + 2; fx++) begin
          exp_t e;
          int xc, yc, xs [$], ys [$];
          xc = fx >> 1; yc = fy >> 1;
          if (xc > CW - 1) xc = CW - 1;
          if (yc > CH - 1) yc = CH - 1;
          xs = {xc}; ys = {yc};
          if (fx % 2 == 1 && xc + 1 < CW && fx < 2 * CW) xs.push_back(xc + 1);
          if (fy % 2 == 1 && yc + 1 < CH && fy < 2 * CH) ys.push_back(yc + 1);
          for (int l = 0; l < NL; l++) begin
            int s, n;
            s = 0; n = 0;
            foreach (ys[a]) foreach (xs[b]) if (cok[l][ys[a]][xs[b]]) begin s += cv[l][ys[a]][xs[b]]; n++; end
            e.ok[l] = pass == 0 && n > 0;
            e.v[l] = 0;
            if (e.ok[l]) begin
              e.v[l] = (2 * s) / n;
              if (e.v[l] > 2047) e.v[l] = 2047;
              if (e.v[l] < -2048) e.v[l] = -2048;
            end
          end
          e.t = cyc;
          q.push_back(e);
          prior_en <= pass == 0;
          in_valid <= 1; x <= 16'(fx); y <= 16'(fy);
          @(posedge clk);
        end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (out[l].ok != e.ok[l] || (e.ok[l] && int'(out[l].v) != e.v[l])) begin
        failures++;
        if (failures < 6) $display("lane %0d got %0d/%0d exp %0d/%0d", l, out[l].ok, out[l].v, e.ok[l], e.v[l]);
      end
    end
    checks++;
    if (cyc - e.t != 2 + 1) begin failures++; if (failures < 6) $display("latency %0d", cyc - e.t); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
