// Control of the multiscale engine.
//
// One frame goes through three phases:
//   LOAD  - the new left/right frame arrives as a raster pixel stream
//           (pix_valid) and is written to level 0 of the newest pyramid slots;
//   BUILD - the pyramid is built level by level by the reduction circuit
//           (level L is scanned and level L+1 written), because the
//           coarse-to-fine scheme needs the whole pyramid before processing;
//   PROC  - once three left frames are stored, every scale is processed from
//           the coarsest to the finest, one raster pass per scale.
// Each pass scans an extended raster: the image plus MARGIN_B (build) or
// MARGIN_P (process) columns and rows, which lets the window pipelines finish
// the last rows without stalling, followed by DRAIN idle clocks for the
// pipeline to empty.  The source design processes scales sequentially from the
// coarsest level; the margins, the drain and the slot rotation are this
// design's choices.  With load, build and processing in sequence a frame takes
// about 3.7 clocks per input pixel at 640x512 (the source design reaches 2.7
// by overlapping pyramid construction better).
//
// Slots: the left pyramids rotate over three slots (newest = slot_l), the
// right ones over two (newest = slot_r).  frame_done pulses after a processed
// frame.
module scale_sequencer
  import vision_pkg::*;
#(
  parameter int W        = 640,
  parameter int H        = 512,
  parameter int NSCALES  = 6,
  parameter int MARGIN_B = 2,
  parameter int MARGIN_P = 6,
  parameter int DRAIN    = 160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_valid,
  output eng_phase_t        phase,
  output logic [2:0]        level,
  output logic [CRD_W-1:0]  lw,          // width  of the current level
  output logic [CRD_W-1:0]  lh,          // height of the current level
  output logic              load_we,
  output logic [CRD_W-1:0]  load_x,
  output logic [CRD_W-1:0]  load_y,
  output logic              scan_valid,
  output logic [CRD_W-1:0]  scan_x,
  output logic [CRD_W-1:0]  scan_y,
  output logic [1:0]        slot_l,
  output logic              slot_r,
  output logic [1:0]        nframes,
  output logic              frame_done
);
  logic [15:0] drain_cnt;
  logic        scanning;
  logic [CRD_W-1:0] margin;

  assign lw      = CRD_W'(W >> level);
  assign lh      = CRD_W'(H >> level);
  assign margin  = (phase == PH_BUILD) ? CRD_W'(MARGIN_B) : CRD_W'(MARGIN_P);
  assign load_we = (phase == PH_LOAD) && pix_valid;
  assign scan_valid = scanning;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_LOAD; level <= '0; load_x <= '0; load_y <= '0;
      scan_x <= '0; scan_y <= '0; scanning <= 1'b0; drain_cnt <= '0;
      slot_l <= '0; slot_r <= 1'b0; nframes <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (phase)
        PH_LOAD: if (pix_valid) begin
          if (load_x == CRD_W'(W - 1)) begin
            load_x <= '0;
            if (load_y == CRD_W'(H - 1)) begin
              load_y <= '0;
              phase <= PH_BUILD; level <= '0;
              scanning <= 1'b1; scan_x <= '0; scan_y <= '0;
              if (nframes != 2'd3) nframes <= nframes + 1'b1;
            end else load_y <= load_y + 1'b1;
          end else load_x <= load_x + 1'b1;
        end
        PH_BUILD, PH_PROC: begin
          if (scanning) begin
            if (scan_x == lw + margin - 1'b1) begin
              scan_x <= '0;
              if (scan_y == lh + margin - 1'b1) begin
                scanning <= 1'b0; drain_cnt <= 16'(DRAIN);
              end else scan_y <= scan_y + 1'b1;
            end else scan_x <= scan_x + 1'b1;
          end else if (drain_cnt != 0) begin
            drain_cnt <= drain_cnt - 1'b1;
          end else if (phase == PH_BUILD) begin
            if (int'(level) + 2 < NSCALES) begin
              level <= level + 1'b1; scanning <= 1'b1; scan_x <= '0; scan_y <= '0;
            end else if (nframes == 2'd3) begin
              phase <= PH_PROC; level <= 3'(NSCALES - 1);
              scanning <= 1'b1; scan_x <= '0; scan_y <= '0;
            end else begin
              phase <= PH_LOAD; level <= '0;
              slot_l <= (slot_l == 2'd2) ? 2'd0 : slot_l + 1'b1;
              slot_r <= ~slot_r;
            end
          end else begin
            if (level != 0) begin
              level <= level - 1'b1; scanning <= 1'b1; scan_x <= '0; scan_y <= '0;
            end else begin
              phase <= PH_LOAD; frame_done <= 1'b1;
              slot_l <= (slot_l == 2'd2) ? 2'd0 : slot_l + 1'b1;
              slot_r <= ~slot_r;
            end
          end
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end
endmodule
