// pix_data_mgt: steers the raw pixel stream to the per-colour detectors.
//
// The sensor's sequencer streams the array row by row, one pixel per valid
// cycle, with pix_sof on the first pixel of a frame and no backpressure. This
// block counts row and column, decides each pixel's Bayer colour (RGGB: even
// rows R G R G ..., odd rows G B G B ...) and hands it as a beat to that
// colour's detector, so the three colours are evaluated side by side, as the
// document describes. After the last pixel of a row it spends HALF cycles
// sending padding (flush) beats and one cycle an end-of-row beat to each lane
// that received pixels in the row. The sequencer must therefore leave at
// least HALF+1 idle cycles between rows; a pixel arriving during that time is
// dropped and reported on stream_err. Frame size comes from the registers.
//
// Timing: beats are registered, one cycle after the pixel. frame_done pulses
// with the last end-of-row beat. While enable is low the block is idle; once
// enabled it waits for pix_sof and processes exactly one frame.
module pix_data_mgt
  import bist_pkg::*;
#(
  parameter int HALF = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  input  coord_t width,
  input  coord_t height,
  // pixel stream from the sensor sequencer
  input  logic   pix_valid,
  input  logic   pix_sof,
  input  pix_t   pix_data,
  // padding lookup
  output logic   lane_pix  [NCOLOR],
  output logic   lane_first[NCOLOR],
  output pix_t   lane_data,
  input  pix_t   pad       [NCOLOR],
  // to the detectors
  output beat_t  beat      [NCOLOR],
  output logic   busy,
  output logic   frame_done,
  output logic   stream_err
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT_SOF, S_ACTIVE, S_FLUSH, S_EOL, S_END} mstate_e;
  localparam int FC_W = $clog2(HALF + 1);

  mstate_e           state;
  coord_t            row, col;
  logic [FC_W-1:0]   fcnt;
  logic [NCOLOR-1:0] seen;     // lanes that got a pixel in this row

  logic   take;                // accept the input pixel as (row, col)
  coord_t prow, pcol;
  color_e pcolor;

  always_comb begin
    take = 1'b0;
    prow = row;
    pcol = col;
    if (state == S_WAIT_SOF && pix_valid && pix_sof) begin
      take = 1'b1;
      prow = '0;
      pcol = '0;
    end else if (state == S_ACTIVE && pix_valid) begin
      take = 1'b1;
    end
    pcolor = bayer_color(prow[0], pcol[0]);
    lane_data = pix_data;
    for (int c = 0; c < NCOLOR; c++) begin
      lane_pix[c]   = take && (pcolor == color_e'(c));
      lane_first[c] = lane_pix[c] && (pcol < coord_t'(2));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      col        <= '0;
      fcnt       <= '0;
      seen       <= '0;
      frame_done <= 1'b0;
      stream_err <= 1'b0;
      for (int c = 0; c < NCOLOR; c++) beat[c] <= '0;
    end else begin
      frame_done <= 1'b0;
      stream_err <= 1'b0;
      for (int c = 0; c < NCOLOR; c++) begin
        beat[c]       <= '0;
        beat[c].row   <= prow;
        beat[c].col   <= pcol;
        beat[c].pad   <= pad[c];
        beat[c].data  <= pix_data;
        beat[c].pix   <= lane_pix[c];
        beat[c].first <= lane_first[c];
      end
      if (!enable) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: state <= S_WAIT_SOF;
          S_WAIT_SOF: if (take) begin
            row  <= '0;
            seen <= 1 << pcolor;
            if (width <= coord_t'(1)) begin
              state <= S_FLUSH;
              fcnt  <= '0;
            end else begin
              col   <= coord_t'(1);
              state <= S_ACTIVE;
            end
          end
          S_ACTIVE: if (take) begin
            if (pix_sof) stream_err <= 1'b1;  // unexpected restart: keep counting
            seen <= seen | (NCOLOR'(1) << pcolor);
            if (col >= width - 1'b1) begin
              state <= S_FLUSH;
              fcnt  <= '0;
            end else begin
              col <= col + 1'b1;
            end
          end
          S_FLUSH: begin
            if (pix_valid) stream_err <= 1'b1;
            for (int c = 0; c < NCOLOR; c++) beat[c].flush <= seen[c];
            if (fcnt == FC_W'(HALF - 1)) state <= S_EOL;
            else fcnt <= fcnt + 1'b1;
          end
          S_EOL: begin
            if (pix_valid) stream_err <= 1'b1;
            for (int c = 0; c < NCOLOR; c++) beat[c].eol <= seen[c];
            seen <= '0;
            col  <= '0;
            if (row >= height - 1'b1) begin
              frame_done <= 1'b1;
              state      <= S_END;
            end else begin
              row   <= row + 1'b1;
              state <= S_ACTIVE;
            end
          end
          S_END: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (state == S_ACTIVE) || (state == S_FLUSH) || (state == S_EOL);

endmodule
