// tb_defect_detect: self-checking test of one colour detector.
//
// Drives rows of random same-colour pixels (with injected hot and dark pixels)
// as pixel, flush and end-of-row beats, with random gaps between pixel beats.
// A reference model computes, for every pixel, the average of its HALF left
// and HALF right neighbours (padding outside the row), the two thresholds and
// the verdict, and counts defects per row for the line check. Every record is
// compared in order with the model, and its arrival cycle is checked: one
// cycle after the beat that brings the pixel to the window centre, or after
// the end-of-row beat for a line record.
module tb_defect_detect;
  import bist_pkg::*;
  localparam int HALF = 2;
  localparam int PMAX = (1 << PIX_W) - 1;

  logic     clk = 1'b0, rst_n = 1'b0;
  beat_t    beat;
  det_cfg_t cfg;
  logic     out_valid;
  defect_t  out_rec;
  int       checks = 0, failures = 0;
  longint   cyc = 0;

  defect_detect #(.HALF(HALF), .COLOR(COL_BLUE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  defect_t exp_q[$];
  longint  exp_cyc[$];
  int      n_dark = 0, n_bright = 0, n_line = 0;

  // Collector: records and their arrival cycles, compared at the end.
  defect_t got_q[$];
  longint  got_cyc[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    got_q.push_back(out_rec);
    got_cyc.push_back(cyc);
  end

  task automatic send(input beat_t b);
    beat = b;
    @(negedge clk);
    beat = '0;
  endtask

  pix_t   p[64];      // current row
  longint bcyc[64];   // cycle each beat of the row was driven

  task automatic run_row(input int n, input int r, input pix_t padl, input pix_t padr, input int ndef);
    int     dcount;
    beat_t  b;
    dcount = 0;
    for (int i = 0; i < n; i++) p[i] = pix_t'(200 + $urandom_range(0, 20));
    for (int k = 0; k < ndef; k++) begin
      int i;
      i = $urandom_range(0, n - 1);
      p[i] = ($urandom_range(0, 1) != 0) ? pix_t'(900 + $urandom_range(0, 100)) : pix_t'($urandom_range(0, 50));
    end
    // drive beats
    for (int i = 0; i < n + HALF; i++) begin
      b = '0;
      b.row = coord_t'(r);
      b.col = coord_t'(2 * i + 1);
      if (i < n) begin
        b.pix = 1'b1;
        b.first = (i == 0);
        b.data = p[i];
        b.pad = padl;
        if ($urandom_range(0, 1) != 0) @(negedge clk);  // gap as on a shared stream
      end else begin
        b.flush = 1'b1;
        b.pad = padr;
      end
      bcyc[i] = cyc;
      send(b);
    end
    // reference model
    for (int i = 0; i < n; i++) begin
      int sum, avg, lo, hi;
      sum = 0;
      for (int j = i - HALF; j <= i + HALF; j++) begin
        if (j == i) continue;
        sum += (j < 0) ? int'(padl) : (j >= n) ? int'(padr) : int'(p[j]);
      end
      avg = sum / (2 * HALF);
      lo  = (avg - int'(cfg.delta_lo) < 0) ? 0 : avg - int'(cfg.delta_lo);
      hi  = (avg + int'(cfg.delta_hi) > PMAX) ? PMAX : avg + int'(cfg.delta_hi);
      if (int'(p[i]) < lo || int'(p[i]) > hi) begin
        defect_t e;
        e.kind  = (int'(p[i]) < lo) ? KIND_DARK : KIND_BRIGHT;
        e.color = COL_BLUE;
        e.row   = coord_t'(r);
        e.col   = coord_t'(2 * i + 1);
        e.value = p[i];
        e.aux   = AUX_W'(avg);
        exp_q.push_back(e);
        exp_cyc.push_back(bcyc[i + HALF] + 2);
        dcount++;
      end
    end
    b = '0;
    b.eol = 1'b1;
    b.row = coord_t'(r);
    if (cfg.line_thr != 0 && dcount >= int'(cfg.line_thr)) begin
      defect_t e;
      e = '0;
      e.kind = KIND_LINE;
      e.color = COL_BLUE;
      e.row = coord_t'(r);
      e.aux = AUX_W'(dcount);
      exp_q.push_back(e);
      exp_cyc.push_back(cyc + 2);
    end
    send(b);
  endtask

  initial begin
    beat = '0;
    cfg.delta_lo = 10'd60;
    cfg.delta_hi = 10'd60;
    cfg.line_thr = 12'd4;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      int n;
      n = $urandom_range(1, 24);
      run_row(n, r, pix_t'($urandom_range(150, 260)), pix_t'($urandom_range(150, 260)),
              $urandom_range(0, 6));
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    // clamping at the pixel range ends
    cfg.delta_lo = 10'd1000;
    cfg.delta_hi = 10'd1000;
    run_row(8, 50, 10'd1023, 10'd0, 3);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != got_q.size()) begin
      failures++;
      $display("expected %0d records, got %0d", exp_q.size(), got_q.size());
    end
    for (int k = 0; k < exp_q.size() && k < got_q.size(); k++) begin
      checks++;
      if (got_q[k] !== exp_q[k] || got_cyc[k] != exp_cyc[k]) begin
        failures++;
        $display("record %0d: got %p at %0d, expected %p at %0d", k, got_q[k], got_cyc[k], exp_q[k], exp_cyc[k]);
      end
      if (exp_q[k].kind == KIND_DARK) n_dark++;
      if (exp_q[k].kind == KIND_BRIGHT) n_bright++;
      if (exp_q[k].kind == KIND_LINE) n_line++;
    end
    checks++;
    if (n_dark == 0 || n_bright == 0 || n_line == 0) begin
      failures++;
      $display("not every record kind exercised: dark %0d bright %0d line %0d", n_dark, n_bright, n_line);
    end
    $display("dark %0d bright %0d line %0d", n_dark, n_bright, n_line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
