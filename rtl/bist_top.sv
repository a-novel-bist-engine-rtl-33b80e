// bist_top: built-in self-test engine for a CMOS image sensor.
//
// The engine sits beside the sensor's pixel pipeline and screens one raw
// Bayer frame (dark or lit) for local defects while it streams out, so the
// tester no longer has to capture and process whole images. Each pixel is
// steered by colour (pix_data_mgt) to one of three detectors
// (defect_detect: red, green, blue), which compare it with two thresholds
// around the average of its same-colour neighbours in the same row; row edges
// are padded (padding_data). Every outlier, and every row with too many of
// them, becomes a record (data_formatting) that a bus master (mem_bus_if)
// writes to system memory. The CPU sets the engine up and starts it through
// the control and status registers (bist_csr behind csr_bus_if); bist_fsm
// sequences the run and raises irq when all records are in memory. The CPU
// software then reads the records and classifies the sensor PASS or FAIL.
// This block structure is the document's; bus protocols, widths, window size
// and register map are this design's choices (see bist_pkg).
//
// Ports: the pixel stream of the sensor sequencer (valid, start of frame,
// data; no backpressure, at least HALF+1 idle cycles between rows), a
// request/acknowledge slave port for the registers, a request/grant write
// master port for the memory, and irq.
module bist_top
  import bist_pkg::*;
#(
  parameter int HALF       = 2,
  parameter int FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // pixel stream
  input  logic             pix_valid,
  input  logic             pix_sof,
  input  pix_t             pix_data,
  // register slave port
  input  logic             s_req,
  input  logic             s_we,
  input  logic [BUS_W-1:0] s_addr,
  input  logic [BUS_W-1:0] s_wdata,
  output logic             s_ack,
  output logic             s_err,
  output logic [BUS_W-1:0] s_rdata,
  // memory write master port
  output logic             m_req,
  output logic [BUS_W-1:0] m_addr,
  output logic [BUS_W-1:0] m_wdata,
  input  logic             m_gnt,
  // run finished, all records stored
  output logic             irq
);
  // register access
  logic             reg_wr, reg_rd;
  csr_idx_e         reg_idx;
  logic [BUS_W-1:0] reg_wdata, reg_rdata;
  // configuration
  logic             start, abort_req, pad_mode;
  coord_t           width, height;
  det_cfg_t         det_cfg;
  pix_t             pad_const[NCOLOR];
  logic [BUS_W-1:0] mem_base, mem_limit;
  // control
  bist_state_e      state;
  logic             load, pix_enable, busy, done;
  // pixel path
  logic             lane_pix[NCOLOR], lane_first[NCOLOR];
  pix_t             lane_data, pad[NCOLOR];
  beat_t            beat[NCOLOR];
  logic             pix_busy, frame_done, stream_err;
  logic             det_valid[NCOLOR];
  defect_t          det_rec[NCOLOR];
  logic             pix_ev[NCOLOR], line_ev[NCOLOR], fifo_ovf[NCOLOR];
  // storage path
  logic             fmt_valid, fmt_ready, fmt_empty;
  logic [REC_W-1:0] fmt_data;
  logic [BUS_W-1:0] stored;
  logic             mem_drop, mem_full, mem_idle;

  csr_bus_if u_csr_bus_if (
    .clk, .rst_n,
    .s_req, .s_we, .s_addr, .s_wdata, .s_ack, .s_err, .s_rdata,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata
  );

  bist_csr u_csr (
    .clk, .rst_n,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata,
    .start, .abort_req, .pad_mode, .width, .height, .det_cfg, .pad_const,
    .mem_base, .mem_limit,
    .clear(load), .state, .busy, .done,
    .pix_ev, .line_ev, .fifo_ovf, .stream_err,
    .mem_drop, .mem_full, .stored
  );

  bist_fsm u_fsm (
    .clk, .rst_n,
    .start, .abort_req, .pix_busy, .frame_done, .fmt_empty, .mem_idle,
    .state, .load, .pix_enable, .busy, .done, .irq
  );

  padding_data u_padding (
    .clk, .rst_n,
    .load, .mode_in(pad_mode), .const_in(pad_const),
    .lane_pix, .lane_first, .lane_data, .pad
  );

  pix_data_mgt #(.HALF(HALF)) u_pix_mgt (
    .clk, .rst_n,
    .enable(pix_enable), .width, .height,
    .pix_valid, .pix_sof, .pix_data,
    .lane_pix, .lane_first, .lane_data, .pad,
    .beat, .busy(pix_busy), .frame_done, .stream_err
  );

  for (genvar c = 0; c < NCOLOR; c++) begin : g_det
    defect_detect #(.HALF(HALF), .COLOR(color_e'(c))) u_det (
      .clk, .rst_n,
      .beat     (beat[c]),
      .cfg      (det_cfg),
      .out_valid(det_valid[c]),
      .out_rec  (det_rec[c])
    );
    assign pix_ev[c]  = det_valid[c] && (det_rec[c].kind != KIND_LINE);
    assign line_ev[c] = det_valid[c] && (det_rec[c].kind == KIND_LINE);
  end

  data_formatting #(.FIFO_DEPTH(FIFO_DEPTH)) u_fmt (
    .clk, .rst_n, .clear(load),
    .in_valid(det_valid), .in_rec(det_rec), .ovf(fifo_ovf),
    .out_valid(fmt_valid), .out_data(fmt_data), .out_ready(fmt_ready),
    .empty(fmt_empty)
  );

  mem_bus_if u_mem_bus_if (
    .clk, .rst_n,
    .clear(load), .base(mem_base), .limit(mem_limit),
    .in_valid(fmt_valid), .in_data(fmt_data), .in_ready(fmt_ready),
    .m_req, .m_addr, .m_wdata, .m_gnt,
    .stored, .drop(mem_drop), .full(mem_full), .idle(mem_idle)
  );

endmodule
