// Testbench for async_fifo: a writer (clock period 10) and a reader (period 7,
// then 23) with random enables move 2000 numbered words through the FIFO;
// the reader checks order and content, the writer honours 'full' and the
// reader 'empty'.  Both the full and the empty condition must occur.  The
// first word must be visible at the read side within 4 read clocks after the
// write (two-flop synchroniser plus pointer update).
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  int rper = 7;
  always #(rper / 2.0) rclk = ~rclk;
  int checks = 0, failures = 0;
  logic wr = 0, rd, full, empty;
  logic [15:0] wdata = 0, rdata;
  async_fifo #(.DW(16), .AW(4)) dut (.*);

  int nw = 0, nr = 0, n_full = 0, n_empty = 0;
  realtime t_w0;

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    while (nw < 2000) begin
      @(negedge wclk);
      wr = !full && $urandom_range(0, 3) != 0;
      wdata = 16'(nw);
      @(posedge wclk);
      if (wr) begin
        if (nw == 0) t_w0 = $realtime;
        nw++;
      end
      if (full) n_full++;
    end
    @(negedge wclk) wr = 0;
  end

  assign rd = !empty && rd_en;
  logic rd_en = 0;
  always @(negedge rclk) rd_en <= $urandom_range(0, 2) != 0;
  always @(posedge rclk) if (rrst_n) begin
    if (empty) n_empty++;
    if (nr == 0 && !empty) begin
      checks++;
      if ($realtime - t_w0 > 4 * rper + 10) begin failures++; $display("first word late"); end
    end
    if (rd) begin
      checks++;
      if (rdata != 16'(nr)) begin failures++; if (failures < 5) $display("word %0d: %0d", nr, rdata); end
      nr++;
      if (nr == 1000) rper = 23;
      if (nr == 2000) begin
        checks++;
        if (n_full == 0 || n_empty == 0) begin failures++; $display("full %0d empty %0d", n_full, n_empty); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
