// tb_bist_csr: self-checking test of the control and status registers.
//
// Writes random values to every configuration register and checks both the
// read-back (truncated to each field's width) and the configuration outputs;
// checks that CTRL produces one-cycle start and abort pulses; drives random
// defect, overflow and drop events for a while and compares the counters and
// sticky flags with a model; and checks that clear resets them.
module tb_bist_csr;
  import bist_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             reg_wr, reg_rd;
  csr_idx_e         reg_idx;
  logic [BUS_W-1:0] reg_wdata, reg_rdata;
  logic             start, abort_req, pad_mode;
  coord_t           width, height;
  det_cfg_t         det_cfg;
  pix_t             pad_const[NCOLOR];
  logic [BUS_W-1:0] mem_base, mem_limit;
  logic             clear;
  bist_state_e      state;
  logic             busy, done;
  logic             pix_ev[NCOLOR], line_ev[NCOLOR], fifo_ovf[NCOLOR];
  logic             stream_err, mem_drop, mem_full;
  logic [BUS_W-1:0] stored;
  int               checks = 0, failures = 0;

  bist_csr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input csr_idx_e i, input logic [BUS_W-1:0] d);
    reg_wr = 1'b1; reg_idx = i; reg_wdata = d;
    @(negedge clk);
    reg_wr = 1'b0;
  endtask

  task automatic rd_check(input csr_idx_e i, input logic [BUS_W-1:0] e, input string what);
    reg_rd = 1'b1; reg_idx = i;
    #1;
    checks++;
    if (reg_rdata != e) begin
      failures++;
      $display("%s: read %h expected %h", what, reg_rdata, e);
    end
    @(negedge clk);
    reg_rd = 1'b0;
  endtask

  function automatic logic [BUS_W-1:0] mask(input int w, input logic [BUS_W-1:0] v);
    return v & ((BUS_W'(1) << w) - 1);
  endfunction

  initial begin
    logic [BUS_W-1:0] v[16];
    int m_pix, m_line, m_drop;
    logic m_serr, m_fovf;
    reg_wr = 0; reg_rd = 0; reg_idx = CSR_CTRL; reg_wdata = '0;
    clear = 0; state = ST_IDLE; busy = 0; done = 0;
    stream_err = 0; mem_drop = 0; mem_full = 0; stored = '0;
    for (int c = 0; c < NCOLOR; c++) begin pix_ev[c] = 0; line_ev[c] = 0; fifo_ovf[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // configuration registers
    for (int rep = 0; rep < 5; rep++) begin
      for (int i = 2; i <= 11; i++) begin
        v[i] = $urandom;
        wr(csr_idx_e'(i), v[i]);
      end
      rd_check(CSR_WIDTH, mask(COORD_W, v[2]), "WIDTH");
      rd_check(CSR_HEIGHT, mask(COORD_W, v[3]), "HEIGHT");
      rd_check(CSR_DELTA_LO, mask(PIX_W, v[4]), "DELTA_LO");
      rd_check(CSR_DELTA_HI, mask(PIX_W, v[5]), "DELTA_HI");
      rd_check(CSR_LINE_THR, mask(COORD_W, v[6]), "LINE_THR");
      rd_check(CSR_PAD_R, mask(PIX_W, v[7]), "PAD_R");
      rd_check(CSR_PAD_G, mask(PIX_W, v[8]), "PAD_G");
      rd_check(CSR_PAD_B, mask(PIX_W, v[9]), "PAD_B");
      rd_check(CSR_MEM_BASE, v[10], "MEM_BASE");
      rd_check(CSR_MEM_LIMIT, v[11], "MEM_LIMIT");
      checks++;
      if (BUS_W'(width) != mask(COORD_W, v[2]) || BUS_W'(height) != mask(COORD_W, v[3]) ||
          BUS_W'(det_cfg.delta_lo) != mask(PIX_W, v[4]) || BUS_W'(det_cfg.delta_hi) != mask(PIX_W, v[5]) ||
          BUS_W'(det_cfg.line_thr) != mask(COORD_W, v[6]) ||
          BUS_W'(pad_const[0]) != mask(PIX_W, v[7]) || BUS_W'(pad_const[1]) != mask(PIX_W, v[8]) ||
          BUS_W'(pad_const[2]) != mask(PIX_W, v[9]) || mem_base != v[10] || mem_limit != v[11]) begin
        failures++;
        $display("configuration outputs differ from the registers");
      end
    end
    // control pulses
    wr(CSR_CTRL, 32'h5);
    checks++;
    if (!start || abort_req || !pad_mode) begin failures++; $display("start pulse missing"); end
    @(negedge clk);
    checks++;
    if (start) begin failures++; $display("start longer than one cycle"); end
    rd_check(CSR_CTRL, 32'h4, "CTRL");
    wr(CSR_CTRL, 32'h2);
    checks++;
    if (start || !abort_req || pad_mode) begin failures++; $display("abort pulse missing"); end
    // counters
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    m_pix = 0; m_line = 0; m_drop = 0; m_serr = 0; m_fovf = 0;
    for (int k = 0; k < 300; k++) begin
      for (int c = 0; c < NCOLOR; c++) begin
        pix_ev[c]   = ($urandom_range(0, 3) == 0);
        line_ev[c]  = ($urandom_range(0, 9) == 0);
        fifo_ovf[c] = ($urandom_range(0, 29) == 0);
        m_pix  += pix_ev[c];
        m_line += line_ev[c];
        m_drop += fifo_ovf[c];
        m_fovf |= fifo_ovf[c];
      end
      mem_drop   = ($urandom_range(0, 19) == 0);
      stream_err = (k == 150);
      m_drop += mem_drop;
      m_serr |= stream_err;
      @(negedge clk);
    end
    for (int c = 0; c < NCOLOR; c++) begin pix_ev[c] = 0; line_ev[c] = 0; fifo_ovf[c] = 0; end
    mem_drop = 0; stream_err = 0;
    state = ST_DONE; busy = 0; done = 1; mem_full = 1; stored = 32'd1234;
    rd_check(CSR_PIX_DEFECTS, 32'(m_pix), "PIX_DEFECTS");
    rd_check(CSR_LINE_DEFECTS, 32'(m_line), "LINE_DEFECTS");
    rd_check(CSR_DROPPED, 32'(m_drop), "DROPPED");
    rd_check(CSR_STORED, 32'd1234, "STORED");
    rd_check(CSR_STATUS, {21'b0, 3'(ST_DONE), 3'b0, 1'b1, m_fovf, m_serr, 1'b1, 1'b0}, "STATUS");
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    mem_full = 0; done = 0;
    rd_check(CSR_PIX_DEFECTS, 32'd0, "PIX_DEFECTS after clear");
    rd_check(CSR_DROPPED, 32'd0, "DROPPED after clear");
    rd_check(CSR_STATUS, {21'b0, 3'(ST_DONE), 8'b0}, "STATUS after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
