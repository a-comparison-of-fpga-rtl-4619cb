// Pipelined CORDIC, vectoring mode: atan2(y, x) and sqrt(x^2 + y^2).
//
// Stands in for the arctangent / magnitude cores the source design takes from
// the FPGA vendor; its internals are this design's own: a standard radix-2
// CORDIC with one micro-rotation per pipeline stage.  The vector is first
// folded into the right half plane (adding half a turn to the angle), then
// ITER micro-rotations drive y to zero while accumulating the angle from an
// arctangent table computed at elaboration.  The angle is a binary angle of
// AW bits (2^AW = one full turn, value range [-1/2, 1/2) turn as a signed
// number).  The magnitude is corrected for the CORDIC gain (x 0.60725).
//
// Timing: fully pipelined, one result per clock, latency LAT = ITER + 2.
module cordic #(
  parameter int IW   = 17,   // input component width (signed)
  parameter int AW   = 12,   // angle width
  parameter int ITER = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [IW-1:0]  x,
  input  logic signed [IW-1:0]  y,
  output logic                  out_valid,
  output logic        [AW-1:0]  angle,
  output logic        [IW:0]    mag
);
  import vision_pkg::atan_tab;
  localparam int XW = IW + 3;            // growth headroom
  localparam int GW = AW + 4;            // guard bits in the angle accumulator

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic        [GW-1:0] zs [ITER+1];
  logic                 vs [ITER+2];

  // stage 0: fold into the right half plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (x < 0) begin
        xs[0] <= -XW'(x); ys[0] <= -XW'(y); zs[0] <= GW'(1) << (GW - 1);
      end else begin
        xs[0] <= XW'(x);  ys[0] <= XW'(y);  zs[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    localparam logic [GW-1:0] AT = GW'(atan_tab(i, GW));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + AT;
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - AT;
        end
      end
    end
  end

  // output stage: gain correction and rounding of the angle
  logic signed [XW+16:0] mprod;
  assign mprod = xs[ITER] * $signed(18'd39797);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[ITER+1] <= 1'b0; angle <= '0; mag <= '0;
    end else begin
      vs[ITER+1] <= vs[ITER];
      angle      <= AW'((zs[ITER] + GW'(8)) >> 4);
      mag        <= (IW+1)'(mprod >>> 16);
    end
  end
  assign out_valid = vs[ITER+1];

endmodule
