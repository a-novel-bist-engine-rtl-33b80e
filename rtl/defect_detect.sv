// defect_detect: defective pixel and line detection for one Bayer colour.
//
// Pixels of one colour arrive in row order as beats from pix_data_mgt. They
// shift through a window of 2*HALF+1 entries; a running accumulator holds the
// sum of the window (add the entering value, subtract the leaving one). When a
// real pixel sits in the centre, the average of its 2*HALF neighbours (centre
// excluded) sets two thresholds, avg - delta_lo and avg + delta_hi (clamped to
// the pixel range). A centre pixel outside them is reported as a dark or bright
// defect. Comparing with a one-dimensional, same-row average, rather than a 2-D
// neighbourhood, follows the document; window size, clamping and the dark /
// bright split are this design's choices.
//
// Row edges: the first pixel of a row loads the HALF older window entries with
// the padding value, and after the last pixel HALF flush beats shift padding in
// from the other side, so the last HALF pixels still reach the centre.
//
// Line detection (own choice, the document only names it): the defects of this
// colour in a row are counted; on the end-of-row beat a line record is emitted
// when the count reaches cfg.line_thr (0 disables it).
//
// Timing: a pixel reaches the centre HALF beats after it entered; its record
// appears on out_valid one cycle after that beat (beats are sampled on the
// clock edge, the record is registered on the next one). A line record
// appears likewise one cycle after the end-of-row beat. At most one record
// per cycle.
module defect_detect
  import bist_pkg::*;
#(
  parameter int     HALF  = 2,
  parameter color_e COLOR = COL_RED
) (
  input  logic     clk,
  input  logic     rst_n,
  input  beat_t    beat,
  input  det_cfg_t cfg,
  output logic     out_valid,
  output defect_t  out_rec
);
  localparam int WIN   = 2 * HALF + 1;
  localparam int SHIFT = $clog2(2 * HALF);
  localparam int ACC_W = PIX_W + $clog2(WIN) + 1;
  localparam int PMAX  = (1 << PIX_W) - 1;

  pix_t               win_val [WIN];
  logic               win_real[WIN];
  coord_t             win_col [WIN];
  coord_t             row_q;
  logic [ACC_W-1:0]   acc;
  logic               shifted_q;    // window moved last cycle: evaluate centre
  logic               eol_q;
  coord_t             row_cnt;      // defects of this colour in the current row

  // Window update ---------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN; i++) begin
        win_val[i]  <= '0;
        win_real[i] <= 1'b0;
        win_col[i]  <= '0;
      end
      acc       <= '0;
      row_q     <= '0;
      shifted_q <= 1'b0;
      eol_q     <= 1'b0;
    end else begin
      shifted_q <= beat.pix | beat.flush;
      eol_q     <= beat.eol;
      if (beat.pix && beat.first) begin
        win_val[0]  <= beat.data;
        win_real[0] <= 1'b1;
        win_col[0]  <= beat.col;
        for (int i = 1; i < WIN; i++) begin
          win_val[i]  <= beat.pad;
          win_real[i] <= 1'b0;
          win_col[i]  <= '0;
        end
        acc   <= ACC_W'(beat.data) + ACC_W'(beat.pad) * ACC_W'(WIN - 1);
        row_q <= beat.row;
      end else if (beat.pix || beat.flush) begin
        win_val[0]  <= beat.pix ? beat.data : beat.pad;
        win_real[0] <= beat.pix;
        win_col[0]  <= beat.col;
        for (int i = 1; i < WIN; i++) begin
          win_val[i]  <= win_val[i-1];
          win_real[i] <= win_real[i-1];
          win_col[i]  <= win_col[i-1];
        end
        acc <= acc + ACC_W'(beat.pix ? beat.data : beat.pad) - ACC_W'(win_val[WIN-1]);
      end
    end
  end

  // Centre evaluation -----------------------------------------------------
  logic [ACC_W-1:0] neigh_sum;
  pix_t             avg, thr_lo, thr_hi, centre;
  logic             is_dark, is_bright, pix_defect, line_defect;

  always_comb begin
    centre    = win_val[HALF];
    neigh_sum = acc - ACC_W'(centre);
    avg       = pix_t'(neigh_sum >> SHIFT);
    thr_lo    = (avg > cfg.delta_lo) ? avg - cfg.delta_lo : '0;
    thr_hi    = ((PIX_W+1)'(avg) + (PIX_W+1)'(cfg.delta_hi) > (PIX_W+1)'(PMAX))
                ? pix_t'(PMAX) : avg + cfg.delta_hi;
    is_dark    = centre < thr_lo;
    is_bright  = centre > thr_hi;
    pix_defect = shifted_q && win_real[HALF] && (is_dark || is_bright);
    line_defect = eol_q && (cfg.line_thr != '0) && (row_cnt >= cfg.line_thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_cnt   <= '0;
      out_valid <= 1'b0;
      out_rec   <= '0;
    end else begin
      out_valid <= pix_defect | line_defect;
      if (beat.pix && beat.first)
        row_cnt <= '0;
      else if (pix_defect && row_cnt != '1)
        row_cnt <= row_cnt + 1'b1;
      if (pix_defect) begin
        out_rec.kind  <= is_dark ? KIND_DARK : KIND_BRIGHT;
        out_rec.color <= COLOR;
        out_rec.row   <= row_q;
        out_rec.col   <= win_col[HALF];
        out_rec.value <= centre;
        out_rec.aux   <= AUX_W'(avg);
      end else if (line_defect) begin
        out_rec.kind  <= KIND_LINE;
        out_rec.color <= COLOR;
        out_rec.row   <= row_q;
        out_rec.col   <= '0;
        out_rec.value <= '0;
        out_rec.aux   <= AUX_W'(row_cnt);
      end
    end
  end

  // A pixel evaluation and a line evaluation never fall in the same cycle:
  // the end-of-row beat follows the last flush beat.
  assert property (@(posedge clk) disable iff (!rst_n) !(pix_defect && line_defect));
  initial assert ((1 << SHIFT) == 2 * HALF) else $error("2*HALF must be a power of two");

endmodule
