// Dual-clock FIFO (blocking FIFO between clock domains).
//
// 2^AW entries; binary pointers are converted to Gray code and passed through
// two-flop synchronisers to the opposite domain, where they produce 'full'
// (write side) and 'empty' (read side).  Both flags are conservative, so a
// writer that respects full and a reader that respects empty never lose or
// repeat a word.  The read side is first-word fall-through: rdata shows the
// head entry whenever empty is low; rd pops it.
module async_fifo #(
  parameter int DW = 64,
  parameter int AW = 4
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wbin, rbin, wgray, rgray;
  logic [AW:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wclk)
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  assign full = wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};

  // read domain
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
  assign empty = rgray == wgray_r2;
  assign rdata = mem[rbin[AW-1:0]];

endmodule
