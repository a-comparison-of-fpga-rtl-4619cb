// Testbench for mcu with two access ports.  Port 0 streams two-word writes
// (as the engine's result writer does) faster than the bank can take them
// for a while, so its request FIFO fills and req_ready drops (blocking);
// port 1 interleaves single-word writes and reads of its own area.  An SRAM
// model (synchronous, read data one mclk after the read) stores the words.
// Checks: every word lands at its address, every read returns the last word
// written there, round-robin arbitration (while both ports wait, the port
// served next is never the one served last), the blocking and the conflict
// cases both occur, and a read on an idle controller is answered within
// 8 engine clocks.
module tb_mcu;
  logic clk = 0, rst_n = 0, mclk = 0, mrst_n = 0;
  always #5 clk = ~clk;
  always #3 mclk = ~mclk;   // two words per request take longer than one engine clock
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        req_valid [2], req_ready [2], req_we [2], req_two [2];
  logic [19:0] req_addr  [2];
  logic [71:0] req_wdata [2];
  logic        rsp_valid [2], rsp_ready [2];
  logic [35:0] rsp_rdata [2];
  logic        sram_ce, sram_we;
  logic [19:0] sram_addr;
  logic [35:0] sram_wdata, sram_rdata = 0;
  mcu #(.NPORT(2), .AW(20), .DWM(36)) dut (.*);

  logic [35:0] sram [int];
  always @(posedge mclk)
    if (sram_ce) begin
      if (sram_we) sram[int'(sram_addr)] = sram_wdata;
      else sram_rdata <= sram.exists(int'(sram_addr)) ? sram[int'(sram_addr)] : 36'h0;
    end

  function automatic logic [35:0] wval(int a);
    return 36'(a * 40503 + 17);
  endfunction

  int n_block = 0, n_conf = 0, n_rr = 0, n0 = 0;
  // round-robin observation (memory clock)
  always @(posedge mclk) if (mrst_n && dut.st == 0 && !dut.rq_empty[0] && !dut.rq_empty[1]) begin
    n_conf++;
    if (dut.pick == dut.last) n_rr++;
  end

  // port 0: 300 two-word writes at 2*i, bursts without gaps
  initial begin
    req_valid[0] = 0; req_we[0] = 1; req_two[0] = 1; req_addr[0] = 0; req_wdata[0] = 0; rsp_ready[0] = 1;
    wait (rst_n);
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      req_valid[0] <= 1; req_addr[0] <= 20'(2 * i); req_wdata[0] <= {wval(2 * i + 1), wval(2 * i)};
      @(posedge clk);
      while (!req_ready[0]) begin n_block++; @(posedge clk); end
      if (i % 100 == 99) begin req_valid[0] <= 0; repeat (50) @(posedge clk); end
    end
    req_valid[0] <= 0;
    n0 = 1;
  end

  // port 1: write/read pairs in its own area
  initial begin
    logic [35:0] d;
    int t;
    req_valid[1] = 0; req_we[1] = 0; req_two[1] = 0; req_addr[1] = 0; req_wdata[1] = 0; rsp_ready[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; mrst_n = 1;
    for (int i = 0; i < 150; i++) begin
      req_valid[1] <= 1; req_we[1] <= 1; req_addr[1] <= 20'h80000 + 20'(i); req_wdata[1] <= {36'd0, wval(1000 + i)};
      @(posedge clk);
      while (!req_ready[1]) @(posedge clk);
      req_valid[1] <= 1; req_we[1] <= 0; req_addr[1] <= 20'h80000 + 20'(i);
      @(posedge clk);
      while (!req_ready[1]) @(posedge clk);
      req_valid[1] <= 0;
      t = cyc;
      while (!rsp_valid[1]) @(posedge clk);
      d = rsp_rdata[1];
      rsp_ready[1] <= 1;
      @(posedge clk);
      rsp_ready[1] <= 0;
      checks++;
      if (d != wval(1000 + i)) begin failures++; if (failures < 5) $display("read %0d: %h", i, d); end
    end
    // idle read latency
    wait (n0 == 1);
    repeat (200) @(posedge clk);
    req_valid[1] <= 1; req_we[1] <= 0; req_addr[1] <= 20'd5;
    @(posedge clk);
    req_valid[1] <= 0;
    t = cyc;
    while (!rsp_valid[1]) @(posedge clk);
    checks++;
    if (cyc - t > 8) begin failures++; $display("read latency %0d", cyc - t); end
    if (rsp_rdata[1] != wval(5)) begin failures++; $display("read of a port-0 word: %h", rsp_rdata[1]); end
    // all port-0 words
    for (int a = 0; a < 600; a++) begin
      checks++;
      if (!sram.exists(a) || sram[a] != wval(a)) begin failures++; if (failures < 8) $display("word %0d missing", a); end
    end
    checks += 3;
    if (n_block == 0) begin failures++; $display("port 0 never blocked"); end
    if (n_conf == 0) begin failures++; $display("no arbitration conflict"); end
    if (n_rr != 0) begin failures++; $display("round robin violated %0d times", n_rr); end
    $display("blocked %0d clocks, %0d conflicts", n_block, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
