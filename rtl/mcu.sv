// Memory Controller Unit: several Abstract Access Ports (AAPs) sharing one
// synchronous SRAM bank.
//
// Following the source design, the controller runs in its own, faster memory
// clock (mclk) so that it can serve the ports by time multiplexing; blocking
// dual-clock FIFOs link each AAP (engine clock clk) to the controller, and a
// round-robin arbiter picks the next port with a pending request.  The AAP
// internals are this design's own: an AAP request is {we, two, addr, data};
// with 'two' set a write stores two consecutive 36-bit words (addr, addr+1),
// which is how the engine writes its 63-bit per-pixel result.  A read returns
// one word through the port's response FIFO.  req_ready is low while the
// port's request FIFO is full (the blocking behaviour).
//
// SRAM side (mclk): sram_ce / sram_we / sram_addr / sram_wdata, read data
// returned on sram_rdata one mclk after the read cycle.
// Timing: a granted write takes one (two for 'two') mclk cycles, a read three.
module mcu #(
  parameter int NPORT = 2,
  parameter int AW    = 20,
  parameter int DWM   = 36
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mclk,
  input  logic                mrst_n,
  // AAPs (clk domain)
  input  logic                req_valid [NPORT],
  output logic                req_ready [NPORT],
  input  logic                req_we    [NPORT],
  input  logic                req_two   [NPORT],
  input  logic [AW-1:0]       req_addr  [NPORT],
  input  logic [2*DWM-1:0]    req_wdata [NPORT],
  output logic                rsp_valid [NPORT],
  input  logic                rsp_ready [NPORT],
  output logic [DWM-1:0]      rsp_rdata [NPORT],
  // SRAM bank (mclk domain)
  output logic                sram_ce,
  output logic                sram_we,
  output logic [AW-1:0]       sram_addr,
  output logic [DWM-1:0]      sram_wdata,
  input  logic [DWM-1:0]      sram_rdata
);
  localparam int RQW = 2 + AW + 2 * DWM;
  localparam int PW  = $clog2(NPORT > 1 ? NPORT : 2);

  typedef enum logic [1:0] {S_IDLE, S_W2, S_RD, S_RD2} st_t;

  logic [RQW-1:0] rq_head  [NPORT];
  logic           rq_empty [NPORT];
  logic           rq_pop   [NPORT];
  logic           rq_full  [NPORT];
  logic           rs_full  [NPORT];
  logic           rs_push  [NPORT];
  logic           rs_empty [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_aap
    async_fifo #(.DW(RQW), .AW(4)) u_req (
      .wclk(clk), .wrst_n(rst_n), .wr(req_valid[p]),
      .wdata({req_we[p], req_two[p], req_addr[p], req_wdata[p]}), .full(rq_full[p]),
      .rclk(mclk), .rrst_n(mrst_n), .rd(rq_pop[p]), .rdata(rq_head[p]), .empty(rq_empty[p]));
    async_fifo #(.DW(DWM), .AW(4)) u_rsp (
      .wclk(mclk), .wrst_n(mrst_n), .wr(rs_push[p]), .wdata(sram_rdata), .full(rs_full[p]),
      .rclk(clk), .rrst_n(rst_n), .rd(rsp_ready[p]), .rdata(rsp_rdata[p]), .empty(rs_empty[p]));
    assign req_ready[p] = !rq_full[p];
    assign rsp_valid[p] = !rs_empty[p];
  end

  // ---- arbiter and SRAM sequencing (mclk) ---------------------------------
  st_t           st;
  logic [PW-1:0] last, cur, pick;
  logic          found;
  logic [DWM-1:0] w2data;
  logic [AW-1:0]  w2addr;

  // round robin: first eligible port after the last one served
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NPORT; k++) begin
      int p;
      p = (int'(last) + k) % NPORT;
      if (!found && !rq_empty[p] && (rq_head[p][RQW-1] || !rs_full[p])) begin
        found = 1'b1;
        pick  = PW'(p);
      end
    end
  end

  always_comb
    for (int p = 0; p < NPORT; p++) rq_pop[p] = (st == S_IDLE) && found && pick == PW'(p);

  always_ff @(posedge mclk or negedge mrst_n) begin
    if (!mrst_n) begin
      st <= S_IDLE; last <= PW'(NPORT - 1); cur <= '0;
      sram_ce <= 1'b0; sram_we <= 1'b0; sram_addr <= '0; sram_wdata <= '0;
      w2data <= '0; w2addr <= '0;
    end else begin
      sram_ce <= 1'b0; sram_we <= 1'b0;
      case (st)
        S_IDLE: if (found) begin
          logic [RQW-1:0] h;
          h = rq_head[pick];
          last      <= pick;
          cur       <= pick;
          sram_ce   <= 1'b1;
          sram_we   <= h[RQW-1];
          sram_addr <= h[2*DWM +: AW];
          sram_wdata <= h[DWM-1:0];
          w2data    <= h[DWM +: DWM];
          w2addr    <= h[2*DWM +: AW] + 1'b1;
          if (h[RQW-1]) st <= h[RQW-2] ? S_W2 : S_IDLE;
          else          st <= S_RD;
        end
        S_W2: begin
          sram_ce <= 1'b1; sram_we <= 1'b1;
          sram_addr <= w2addr; sram_wdata <= w2data;
          st <= S_IDLE;
        end
        S_RD:  st <= S_RD2;    // SRAM samples the read address
        S_RD2: st <= S_IDLE;   // read word on sram_rdata, pushed below
        default: st <= S_IDLE;
      endcase
    end
  end

  // the read word is on sram_rdata during S_RD2; push it into the response FIFO
  always_comb
    for (int p = 0; p < NPORT; p++) rs_push[p] = (st == S_RD2) && cur == PW'(p);

endmodule
