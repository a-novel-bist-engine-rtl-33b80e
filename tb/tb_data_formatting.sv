// tb_data_formatting: self-checking test of record buffering and encoding.
//
// Three lanes push random defect records, sometimes all at once, while the
// output is drained with random backpressure. A model holds one queue per
// lane of depth FIFO_DEPTH: a record pushed into a full queue must be reported
// on ovf and lost. Each record leaving must be the packed two-word form of
// the head of some lane's queue, taken in round-robin order, and within a
// lane records must keep their order. A clear, applied while the buffers are
// full, must discard everything. Output stability under backpressure is
// checked by the block's own assertion.
module tb_data_formatting;
  import bist_pkg::*;
  localparam int DEPTH = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             clear;
  logic             in_valid[NCOLOR];
  defect_t          in_rec[NCOLOR];
  logic             ovf[NCOLOR];
  logic             out_valid, out_ready, empty;
  logic [REC_W-1:0] out_data;
  int               checks = 0, failures = 0, n_ovf = 0, n_out = 0, n_stall = 0, n_clear = 0;

  data_formatting #(.FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  defect_t q[NCOLOR][$];   // model FIFOs
  defect_t m_out;          // model output register
  logic    m_valid;
  int      m_rr;

  function automatic logic [REC_W-1:0] pack(input defect_t d);
    return {d.aux, 6'h0, d.value, d.kind, d.color, 4'h0, d.row, d.col};
  endfunction

  initial begin
    for (int c = 0; c < NCOLOR; c++) begin in_valid[c] = 1'b0; in_rec[c] = '0; end
    out_ready = 1'b0;
    clear = 1'b0;
    m_valid = 1'b0;
    m_rr = 0;
    m_out = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 3000; step++) begin
      logic burst;
      logic full_m[NCOLOR];
      burst = (step % 200) < 20;   // overload phases
      for (int c = 0; c < NCOLOR; c++) begin
        in_valid[c] = burst ? 1'b1 : ($urandom_range(0, 5) == 0);
        in_rec[c] = defect_t'({$urandom, $urandom});
        in_rec[c].color = color_e'(c);
        in_rec[c].kind  = kind_e'($urandom_range(0, 2));
      end
      out_ready = burst ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      clear = (step % 200) == 25;   // right after an overload phase: buffers are full
      #1;
      for (int c = 0; c < NCOLOR; c++) begin
        full_m[c] = (q[c].size() == DEPTH);
        checks++;
        if (ovf[c] != (in_valid[c] && full_m[c])) begin
          failures++;
          $display("step %0d lane %0d ovf %0b expected %0b", step, c, ovf[c], in_valid[c] && full_m[c]);
        end
        if (ovf[c]) n_ovf++;
      end
      checks++;
      if (out_valid != m_valid || (m_valid && out_data != pack(m_out))) begin
        failures++;
        $display("step %0d output %0b %h expected %0b %h", step, out_valid, out_data, m_valid, pack(m_out));
      end
      checks++;
      if (empty != (!m_valid && q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0)) begin
        failures++;
        $display("step %0d empty flag wrong", step);
      end
      if (out_valid && out_ready) n_out++;
      if (out_valid && !out_ready) n_stall++;
      // model of the clock edge
      if (clear) begin
        n_clear++;
        m_valid = 1'b0;
        m_rr = 0;
        for (int c = 0; c < NCOLOR; c++) q[c].delete();
      end else if (!m_valid || out_ready) begin
        int sel;
        sel = -1;
        for (int k = 0; k < NCOLOR; k++) begin
          int lane;
          lane = (m_rr + k) % NCOLOR;
          if (sel < 0 && q[lane].size() > 0) sel = lane;
        end
        m_valid = (sel >= 0);
        if (sel >= 0) begin
          m_out = q[sel].pop_front();
          m_rr  = (sel + 1) % NCOLOR;
        end
      end
      if (!clear)
        for (int c = 0; c < NCOLOR; c++)
          if (in_valid[c] && !full_m[c]) q[c].push_back(in_rec[c]);
      @(negedge clk);
    end
    checks++;
    if (n_ovf == 0 || n_out == 0 || n_stall == 0 || n_clear == 0) begin
      failures++;
      $display("not exercised: overflow %0d out %0d stall %0d", n_ovf, n_out, n_stall);
    end
    $display("records out %0d, dropped %0d, stalled cycles %0d", n_out, n_ovf, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
