// bist_csr: control and status registers of the BIST engine.
//
// Holds the run setup written by the CPU (frame size, the two threshold
// offsets, line threshold, padding mode and per-colour padding values, memory
// window) and returns status and event counters: defective pixels and lines
// found, records stored and records lost. Writing CTRL bit 0 pulses start and
// bit 1 pulses abort; bit 2 is the padding mode and reads back. Counters and
// the sticky error flags clear when a run starts (clear). Register access is
// single-cycle: reg_rdata is combinational from reg_idx. The register map is
// in bist_pkg; it and the counters are this design's choices, the document
// only shows a "Control & status registers" block.
module bist_csr
  import bist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // register access
  input  logic             reg_wr,
  input  logic             reg_rd,
  input  csr_idx_e         reg_idx,
  input  logic [BUS_W-1:0] reg_wdata,
  output logic [BUS_W-1:0] reg_rdata,
  // configuration out
  output logic             start,
  output logic             abort_req,
  output logic             pad_mode,
  output coord_t           width,
  output coord_t           height,
  output det_cfg_t         det_cfg,
  output pix_t             pad_const[NCOLOR],
  output logic [BUS_W-1:0] mem_base,
  output logic [BUS_W-1:0] mem_limit,
  // status in
  input  logic             clear,
  input  bist_state_e      state,
  input  logic             busy,
  input  logic             done,
  input  logic             pix_ev   [NCOLOR],  // pixel defect reported
  input  logic             line_ev  [NCOLOR],  // line defect reported
  input  logic             fifo_ovf [NCOLOR],  // record lost at a full FIFO
  input  logic             stream_err,
  input  logic             mem_drop,
  input  logic             mem_full,
  input  logic [BUS_W-1:0] stored
);
  logic [BUS_W-1:0] pix_cnt, line_cnt, drop_cnt;
  logic             err_stream, err_fifo;
  logic [1:0]       n_pix, n_line;
  logic [2:0]       n_drop;

  always_comb begin
    n_pix  = '0;
    n_line = '0;
    n_drop = 3'(mem_drop);
    for (int c = 0; c < NCOLOR; c++) begin
      n_pix  = n_pix + 2'(pix_ev[c]);
      n_line = n_line + 2'(line_ev[c]);
      n_drop = n_drop + 3'(fifo_ovf[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start      <= 1'b0;
      abort_req      <= 1'b0;
      pad_mode   <= 1'b0;
      width      <= '0;
      height     <= '0;
      det_cfg    <= '0;
      for (int c = 0; c < NCOLOR; c++) pad_const[c] <= '0;
      mem_base   <= '0;
      mem_limit  <= '0;
      pix_cnt    <= '0;
      line_cnt   <= '0;
      drop_cnt   <= '0;
      err_stream <= 1'b0;
      err_fifo   <= 1'b0;
    end else begin
      start <= 1'b0;
      abort_req <= 1'b0;
      if (reg_wr) begin
        unique case (reg_idx)
          CSR_CTRL: begin
            start    <= reg_wdata[0];
            abort_req    <= reg_wdata[1];
            pad_mode <= reg_wdata[2];
          end
          CSR_WIDTH:     width            <= reg_wdata[COORD_W-1:0];
          CSR_HEIGHT:    height           <= reg_wdata[COORD_W-1:0];
          CSR_DELTA_LO:  det_cfg.delta_lo <= reg_wdata[PIX_W-1:0];
          CSR_DELTA_HI:  det_cfg.delta_hi <= reg_wdata[PIX_W-1:0];
          CSR_LINE_THR:  det_cfg.line_thr <= reg_wdata[COORD_W-1:0];
          CSR_PAD_R:     pad_const[COL_RED]   <= reg_wdata[PIX_W-1:0];
          CSR_PAD_G:     pad_const[COL_GREEN] <= reg_wdata[PIX_W-1:0];
          CSR_PAD_B:     pad_const[COL_BLUE]  <= reg_wdata[PIX_W-1:0];
          CSR_MEM_BASE:  mem_base  <= reg_wdata;
          CSR_MEM_LIMIT: mem_limit <= reg_wdata;
          default: ;  // status and counters are read-only
        endcase
      end
      if (clear) begin
        pix_cnt    <= '0;
        line_cnt   <= '0;
        drop_cnt   <= '0;
        err_stream <= 1'b0;
        err_fifo   <= 1'b0;
      end else begin
        pix_cnt  <= pix_cnt + BUS_W'(n_pix);
        line_cnt <= line_cnt + BUS_W'(n_line);
        drop_cnt <= drop_cnt + BUS_W'(n_drop);
        if (stream_err) err_stream <= 1'b1;
        if (fifo_ovf[0] || fifo_ovf[1] || fifo_ovf[2]) err_fifo <= 1'b1;
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_rd) begin
      unique case (reg_idx)
        CSR_CTRL:         reg_rdata = BUS_W'({pad_mode, 2'b00});
        CSR_STATUS:       reg_rdata = BUS_W'({state, 3'b000, mem_full, err_fifo, err_stream, done, busy});
        CSR_WIDTH:        reg_rdata = BUS_W'(width);
        CSR_HEIGHT:       reg_rdata = BUS_W'(height);
        CSR_DELTA_LO:     reg_rdata = BUS_W'(det_cfg.delta_lo);
        CSR_DELTA_HI:     reg_rdata = BUS_W'(det_cfg.delta_hi);
        CSR_LINE_THR:     reg_rdata = BUS_W'(det_cfg.line_thr);
        CSR_PAD_R:        reg_rdata = BUS_W'(pad_const[COL_RED]);
        CSR_PAD_G:        reg_rdata = BUS_W'(pad_const[COL_GREEN]);
        CSR_PAD_B:        reg_rdata = BUS_W'(pad_const[COL_BLUE]);
        CSR_MEM_BASE:     reg_rdata = mem_base;
        CSR_MEM_LIMIT:    reg_rdata = mem_limit;
        CSR_PIX_DEFECTS:  reg_rdata = pix_cnt;
        CSR_LINE_DEFECTS: reg_rdata = line_cnt;
        CSR_STORED:       reg_rdata = stored;
        CSR_DROPPED:      reg_rdata = drop_cnt;
        default:          reg_rdata = '0;
      endcase
    end
  end

endmodule
