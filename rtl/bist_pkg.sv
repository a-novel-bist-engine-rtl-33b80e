// bist_pkg: widths, types and register map shared by the CMOS image sensor
// BIST engine.
//
// The engine screens a raw Bayer frame for local defects: every pixel is
// compared with two thresholds placed around the average of its same-colour
// neighbours in the same row, and each outlier is written to system memory as
// a record (colour, kind, coordinates, value). The pixel, coordinate and bus
// widths below are this design's choice; the document gives none of them.
//
// Memory record (two 32-bit words, word 0 at the lower address):
//   word 0 = { kind[1:0], colour[1:0], 4'h0, row[11:0], col[11:0] }
//   word 1 = { aux[15:0], 6'h0, value[9:0] }
//   kind 0 = pixel below the low threshold (dark), 1 = above the high
//   threshold (bright), 2 = defective line. For a pixel record aux is the
//   local average and value the pixel; for a line record aux is the number
//   of defective pixels of that colour in the row, col and value are 0.
//
// CSR map (32-bit registers, byte address = 4 * index), see csr_idx_e.
package bist_pkg;

  localparam int PIX_W   = 10;  // pixel value width
  localparam int COORD_W = 12;  // row / column width (arrays up to 4096x4096)
  localparam int BUS_W   = 32;  // system bus data and address width
  localparam int AUX_W   = 16;
  localparam int REC_W   = 2 * BUS_W;
  localparam int NCOLOR  = 3;

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [COORD_W-1:0] coord_t;

  typedef enum logic [1:0] {
    COL_RED   = 2'd0,
    COL_GREEN = 2'd1,
    COL_BLUE  = 2'd2
  } color_e;

  typedef enum logic [1:0] {
    KIND_DARK   = 2'd0,
    KIND_BRIGHT = 2'd1,
    KIND_LINE   = 2'd2
  } kind_e;

  // One beat from Pix data mgt to a detector lane.
  typedef struct packed {
    logic   pix;    // a real pixel of this lane's colour
    logic   first;  // first pixel of this colour in the row
    logic   flush;  // padding beat after the row's last pixel
    logic   eol;    // end of row: evaluate the line
    pix_t   data;   // pixel value (pix beats)
    pix_t   pad;    // padding value for first/flush beats
    coord_t row;
    coord_t col;
  } beat_t;

  // One defect found by a detector.
  typedef struct packed {
    kind_e              kind;
    color_e             color;
    coord_t             row;
    coord_t             col;
    pix_t               value;
    logic [AUX_W-1:0]   aux;
  } defect_t;

  // Detection settings shared by the three detectors.
  typedef struct packed {
    pix_t   delta_lo;  // low threshold  = local average - delta_lo
    pix_t   delta_hi;  // high threshold = local average + delta_hi
    coord_t line_thr;  // defects per row and colour that make a line, 0 = off
  } det_cfg_t;

  typedef enum logic [3:0] {
    CSR_CTRL        = 4'd0,   // W: bit0 start, bit1 abort (self-clearing); RW bit2 pad mode
    CSR_STATUS      = 4'd1,   // R: bit0 busy, bit1 done, bit2 stream error, bit3 fifo overflow,
                              //    bit4 memory full, bits 10:8 FSM state
    CSR_WIDTH       = 4'd2,   // pixels per row
    CSR_HEIGHT      = 4'd3,   // rows per frame
    CSR_DELTA_LO    = 4'd4,
    CSR_DELTA_HI    = 4'd5,
    CSR_LINE_THR    = 4'd6,
    CSR_PAD_R       = 4'd7,
    CSR_PAD_G       = 4'd8,
    CSR_PAD_B       = 4'd9,
    CSR_MEM_BASE    = 4'd10,  // byte address of the first record
    CSR_MEM_LIMIT   = 4'd11,  // records that fit in the window
    CSR_PIX_DEFECTS = 4'd12,  // R: defective pixels found in the frame
    CSR_LINE_DEFECTS= 4'd13,  // R: defective lines found in the frame
    CSR_STORED      = 4'd14,  // R: records written to memory
    CSR_DROPPED     = 4'd15   // R: records lost (FIFO overflow or memory full)
  } csr_idx_e;

  localparam int NREGS = 16;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_LOAD  = 3'd1,
    ST_ARMED = 3'd2,
    ST_RUN   = 3'd3,
    ST_DRAIN = 3'd4,
    ST_DONE  = 3'd5
  } bist_state_e;

  // Bayer colour of a pixel, RGGB order: even rows R G R G, odd rows G B G B.
  function automatic color_e bayer_color(input logic row_odd, input logic col_odd);
    if (!row_odd && !col_odd) return COL_RED;
    if (row_odd && col_odd)   return COL_BLUE;
    return COL_GREEN;
  endfunction

  function automatic logic [REC_W-1:0] format_record(input defect_t d);
    logic [BUS_W-1:0] w0, w1;
    w0 = {d.kind, d.color, 4'h0, d.row, d.col};
    w1 = {d.aux, {(BUS_W-AUX_W-PIX_W){1'b0}}, d.value};
    return {w1, w0};
  endfunction

endpackage
