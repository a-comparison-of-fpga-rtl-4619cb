// Four-bank image memory, split by row and column parity.
//
// Pixel (x, y) lives in bank {y[0], x[0]} at address base + (y/2)*(w/2) + x/2
// (vision_pkg::qaddr), so any 2x2 neighbourhood can be read in one clock, one
// word per bank.  This gives the warping stages the one-pixel-per-clock
// throughput that the source design obtains by storing a 2x2 window per pixel.
// In the source design the image pyramids sit in external SRAM banks; here
// they are on-chip memory, which is this design's choice.
//
// Ports: one write port (bank select, address, data) and NR read ports, each
// with one address per bank.  Reads are registered: data appears one clock
// after the address.
module quad_ram #(
  parameter int DW    = 8,
  parameter int DEPTH = 109200,      // words per bank
  parameter int NR    = 1
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [1:0]                wbank,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic [DW-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0]  raddr [NR][4],
  output logic [DW-1:0]             rdata [NR][4]
);
  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [DW-1:0] mem [DEPTH];
    always_ff @(posedge clk)
      if (we && wbank == 2'(b)) mem[waddr] <= wdata;
    for (genvar r = 0; r < NR; r++) begin : g_rd
      always_ff @(posedge clk) rdata[r][b] <= mem[raddr[r][b]];
    end
  end
endmodule
