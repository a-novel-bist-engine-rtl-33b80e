// tb_bist_top: end-to-end test of the BIST engine at its default parameters.
//
// The testbench plays the three outside parties: the sensor sequencer (a
// generated Bayer frame streamed row by row with horizontal blanking), the
// CPU (register reads and writes over the slave port) and the memory
// (mem_model, with random bus stalls). For each run it programs the engine,
// streams a frame, waits for irq, then compares the records in memory and
// the counters with a reference model that recomputes the one-dimensional
// same-colour window test, the padding and the line rule from the frame.
//
// Runs: constant padding; replicate padding with a defective row; a memory
// window smaller than the number of defects (memory full); a row where every
// pixel is defective (FIFO overflow); a pixel sent inside the row blanking
// (stream error); an abort in the middle of a frame, with the memory bus
// nearly blocked so records are still buffered (none of them may appear in
// the next run's memory window); and a final 640x480 frame. Each mechanism
// is counted and must occur at least once.
module tb_bist_top;
  import bist_pkg::*;
  localparam int HALF  = 2;             // the top's default window half-width
  localparam int MAXW  = 640;
  localparam int MAXH  = 480;
  localparam int PMAX  = (1 << PIX_W) - 1;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             pix_valid, pix_sof;
  pix_t             pix_data;
  logic             s_req, s_we, s_ack, s_err;
  logic [BUS_W-1:0] s_addr, s_wdata, s_rdata;
  logic             m_req, m_gnt;
  logic [BUS_W-1:0] m_addr, m_wdata;
  logic             irq;
  int               gnt_pct;
  int               checks = 0, failures = 0;

  bist_top dut (.*);

  mem_model u_mem (.clk, .req(m_req), .addr(m_addr), .wdata(m_wdata), .gnt(m_gnt), .gnt_pct);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_irq = 0;
  always @(posedge clk) if (irq) n_irq++;

  // ---------------------------------------------------------------- CPU
  task automatic csr_wr(input csr_idx_e i, input logic [BUS_W-1:0] d);
    s_req = 1'b1; s_we = 1'b1; s_addr = BUS_W'(4 * int'(i)); s_wdata = d;
    do @(negedge clk); while (!s_ack);
    s_req = 1'b0;
    @(negedge clk);
  endtask

  task automatic csr_rd(input csr_idx_e i, output logic [BUS_W-1:0] d);
    s_req = 1'b1; s_we = 1'b0; s_addr = BUS_W'(4 * int'(i)); s_wdata = '0;
    do @(negedge clk); while (!s_ack);
    d = s_rdata;
    s_req = 1'b0;
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- frame
  pix_t frame[MAXH][MAXW];
  int   W, H;
  pix_t base_lvl[NCOLOR];

  task automatic make_frame(input int w, input int h, input int n_def, input int bad_row,
                            input int checker_row);
    W = w; H = h;
    for (int c = 0; c < NCOLOR; c++) base_lvl[c] = pix_t'(300 + 100 * c);
    for (int r = 0; r < h; r++)
      for (int x = 0; x < w; x++)
        frame[r][x] = base_lvl[bayer_color(r[0], x[0])] + pix_t'($urandom_range(0, 16)) - 10'd8;
    for (int k = 0; k < n_def; k++) begin
      int r, x;
      r = $urandom_range(0, h - 1);
      x = $urandom_range(0, w - 1);
      frame[r][x] = ($urandom_range(0, 1) != 0) ? pix_t'(PMAX - $urandom_range(0, 20)) : pix_t'($urandom_range(0, 20));
    end
    if (bad_row >= 0)       // a defective row: every eighth pixel stuck high
      for (int x = 0; x < w; x += 8) frame[bad_row][x] = pix_t'(PMAX);
    if (checker_row >= 0)   // every pixel defective: same-colour values alternate 0 / max
      for (int x = 0; x < w; x++) frame[checker_row][x] = ((x / 2) % 2 != 0) ? pix_t'(PMAX) : '0;
  endtask

  // ---------------------------------------------------------------- model
  int   exp_cnt[logic [REC_W-1:0]];   // expected records, as packed memory words
  int   m_pix, m_line;
  logic [BUS_W-1:0] cfg_dlo, cfg_dhi, cfg_lthr;
  pix_t cfg_pad[NCOLOR];
  logic cfg_mode;

  task automatic model_frame();
    exp_cnt.delete();
    m_pix = 0; m_line = 0;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < NCOLOR; c++) begin
        int   cols[MAXW];
        int   n, cnt;
        n = 0; cnt = 0;
        for (int x = 0; x < W; x++)
          if (bayer_color(r[0], x[0]) == color_e'(c)) begin cols[n] = x; n++; end
        if (n == 0) continue;
        for (int i = 0; i < n; i++) begin
          int sum, avg, lo, hi, v;
          sum = 0;
          for (int j = i - HALF; j <= i + HALF; j++) begin
            if (j == i) continue;
            if (j < 0)       sum += cfg_mode ? int'(frame[r][cols[0]])     : int'(cfg_pad[c]);
            else if (j >= n) sum += cfg_mode ? int'(frame[r][cols[n - 1]]) : int'(cfg_pad[c]);
            else             sum += int'(frame[r][cols[j]]);
          end
          avg = sum / (2 * HALF);
          lo  = avg - int'(cfg_dlo); if (lo < 0) lo = 0;
          hi  = avg + int'(cfg_dhi); if (hi > PMAX) hi = PMAX;
          v   = int'(frame[r][cols[i]]);
          if (v < lo || v > hi) begin
            logic [REC_W-1:0] rec;
            rec = {16'(avg), 6'h0, 10'(v), (v < lo) ? 2'd0 : 2'd1, 2'(c), 4'h0, 12'(r), 12'(cols[i])};
            exp_cnt[rec]++;
            cnt++;
            m_pix++;
          end
        end
        if (cfg_lthr != 0 && cnt >= int'(cfg_lthr)) begin
          logic [REC_W-1:0] rec;
          rec = {16'(cnt), 6'h0, 10'h0, 2'd2, 2'(c), 4'h0, 12'(r), 12'h0};
          exp_cnt[rec]++;
          m_line++;
        end
      end
    end
  endtask

  // ---------------------------------------------------------------- sensor
  task automatic stream_frame(input int blank, input int inject_row, input int abort_row);
    for (int r = 0; r < H; r++) begin
      if (r == abort_row) begin
        csr_wr(CSR_CTRL, 32'h2);
        return;
      end
      for (int x = 0; x < W; x++) begin
        pix_valid = 1'b1;
        pix_sof   = (r == 0 && x == 0);
        pix_data  = frame[r][x];
        @(negedge clk);
      end
      for (int k = 0; k < blank; k++) begin
        pix_valid = (r == inject_row && k == 1);
        pix_sof   = 1'b0;
        pix_data  = pix_t'($urandom);
        @(negedge clk);
      end
    end
    pix_valid = 1'b0;
  endtask

  // ---------------------------------------------------------------- checks
  int ev_dark = 0, ev_bright = 0, ev_line = 0, ev_fifo_ovf = 0, ev_mem_full = 0;
  int ev_stream_err = 0, ev_abort = 0, ev_replicate = 0, ev_stall = 0, ev_exact = 0;

  task automatic run(input string name, input int w, input int h, input int n_def,
                     input int bad_row, input int checker_row, input logic mode,
                     input int limit, input int gpct, input int inject_row, input int abort_row);
    logic [BUS_W-1:0] st, stored, dropped, npix, nline, base;
    int irq0, waitc, ok, subset_bad;
    base = 32'h8000_0000 + 32'($urandom_range(0, 255) * 64);
    make_frame(w, h, n_def, bad_row, checker_row);
    cfg_dlo = 32'd60; cfg_dhi = 32'd60; cfg_lthr = 32'(w / 8 > 2 ? w / 8 : 2);
    cfg_mode = mode;
    for (int c = 0; c < NCOLOR; c++) cfg_pad[c] = base_lvl[c];
    gnt_pct = gpct;
    u_mem.mem.delete();
    csr_wr(CSR_WIDTH, 32'(w));
    csr_wr(CSR_HEIGHT, 32'(h));
    csr_wr(CSR_DELTA_LO, cfg_dlo);
    csr_wr(CSR_DELTA_HI, cfg_dhi);
    csr_wr(CSR_LINE_THR, cfg_lthr);
    csr_wr(CSR_PAD_R, 32'(cfg_pad[0]));
    csr_wr(CSR_PAD_G, 32'(cfg_pad[1]));
    csr_wr(CSR_PAD_B, 32'(cfg_pad[2]));
    csr_wr(CSR_MEM_BASE, base);
    csr_wr(CSR_MEM_LIMIT, 32'(limit));
    csr_wr(CSR_CTRL, {29'b0, mode, 2'b01});
    model_frame();
    irq0 = n_irq;
    repeat (4) @(negedge clk);
    stream_frame($urandom_range(HALF + 1, HALF + 4), inject_row, abort_row);
    if (abort_row >= 0) begin
      repeat (5) @(negedge clk);
      csr_rd(CSR_STATUS, st);
      checks++;
      if (st[10:8] != 3'(ST_IDLE) || st[0]) begin
        failures++;
        $display("%s: not idle after abort, status %h", name, st);
      end else ev_abort++;
      return;
    end
    waitc = 0;
    while (n_irq == irq0 && waitc < 200000) begin @(negedge clk); waitc++; end
    csr_rd(CSR_STATUS, st);
    csr_rd(CSR_STORED, stored);
    csr_rd(CSR_DROPPED, dropped);
    csr_rd(CSR_PIX_DEFECTS, npix);
    csr_rd(CSR_LINE_DEFECTS, nline);
    checks++;
    if (n_irq != irq0 + 1 || !st[1] || st[0]) begin
      failures++;
      $display("%s: no completion (irq %0d, status %h)", name, n_irq - irq0, st);
    end
    checks++;
    if (int'(npix) != m_pix || int'(nline) != m_line) begin
      failures++;
      $display("%s: counters pix %0d/%0d line %0d/%0d", name, npix, m_pix, nline, m_line);
    end
    checks++;
    if (int'(stored) + int'(dropped) != m_pix + m_line) begin
      failures++;
      $display("%s: stored %0d + dropped %0d != %0d", name, stored, dropped, m_pix + m_line);
    end
    // every stored record must be an expected one
    subset_bad = 0;
    for (int k = 0; k < int'(stored); k++) begin
      logic [REC_W-1:0] rec;
      logic [BUS_W-1:0] a;
      a = base + 32'(8 * k);
      rec = {u_mem.mem.exists(a + 4) ? u_mem.mem[a + 4] : 32'hDEAD_BEEF,
             u_mem.mem.exists(a) ? u_mem.mem[a] : 32'hDEAD_BEEF};
      if (exp_cnt.exists(rec) && exp_cnt[rec] > 0) begin
        exp_cnt[rec]--;
        if (rec[31:30] == 2'd0) ev_dark++;
        if (rec[31:30] == 2'd1) ev_bright++;
        if (rec[31:30] == 2'd2) ev_line++;
      end else begin
        subset_bad++;
        if (subset_bad < 5) $display("%s: unexpected record %h", name, rec);
      end
    end
    checks++;
    if (subset_bad != 0) begin
      failures++;
      $display("%s: %0d records not predicted", name, subset_bad);
    end
    // without losses the memory holds exactly the expected set
    if (dropped == 0) begin
      ok = 1;
      foreach (exp_cnt[key]) if (exp_cnt[key] != 0) ok = 0;
      checks++;
      if (ok == 0) begin
        failures++;
        $display("%s: expected records missing from memory", name);
      end
      ev_exact++;
    end
    checks++;
    if (st[2] != (inject_row >= 0)) begin
      failures++;
      $display("%s: stream error flag %0b", name, st[2]);
    end
    if (st[2]) ev_stream_err++;
    if (st[3]) ev_fifo_ovf++;
    if (st[4]) ev_mem_full++;
    if (mode) ev_replicate++;
    checks++;
    if (st[4] != (m_pix + m_line > limit && !st[3]) && !st[3]) begin
      failures++;
      $display("%s: memory full flag %0b", name, st[4]);
    end
    $display("%-14s %0dx%0d: %0d pixel and %0d line defects, stored %0d dropped %0d, %0d cycles to irq",
             name, w, h, npix, nline, stored, dropped, waitc);
  endtask

  initial begin
    pix_valid = 0; pix_sof = 0; pix_data = '0;
    s_req = 0; s_we = 0; s_addr = '0; s_wdata = '0;
    gnt_pct = 100;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    //   name            w    h   def bad chk mode limit  gnt inj abort
    run("constant pad",  32,  8,   4, -1, -1, 0, 1000,  70, -1, -1);
    run("replicate pad", 40, 10,   3,  3, -1, 1, 1000, 100, -1, -1);
    run("memory full",   32,  8,  30, -1, -1, 0,    6, 100, -1, -1);
    run("fifo overflow", 48,  6,   0, -1,  2, 0, 1000,  50, -1, -1);
    run("stream error",  24,  6,   6, -1, -1, 1, 1000, 100,  2, -1);
    run("abort",         48,  8,  40, -1, -1, 0, 1000,   5, -1,  4);
    run("vga frame",    MAXW, MAXH, 200, 100, -1, 0, 4096, 90, -1, -1);
    ev_stall = u_mem.stalls;
    checks++;
    if (ev_dark == 0 || ev_bright == 0 || ev_line == 0 || ev_fifo_ovf == 0 || ev_mem_full == 0 ||
        ev_stream_err == 0 || ev_abort == 0 || ev_replicate == 0 || ev_stall == 0 || ev_exact == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("mechanisms: dark %0d bright %0d line %0d fifo-overflow %0d memory-full %0d stream-error %0d abort %0d replicate-pad %0d bus-stall %0d lossless-runs %0d",
             ev_dark, ev_bright, ev_line, ev_fifo_ovf, ev_mem_full, ev_stream_err, ev_abort, ev_replicate, ev_stall, ev_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
