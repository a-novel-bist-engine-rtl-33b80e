// tb_padding_data: self-checking test of the row-edge padding source.
//
// In constant mode the padding of each colour must be the value latched at
// load, unaffected by later changes of the inputs until the next load. In
// replicate mode it must be the pixel itself on a lane's first pixel and the
// last pixel seen on that lane otherwise. A model keeps its own copy of the
// latched constants and the last pixel of each lane.
module tb_padding_data;
  import bist_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, mode_in;
  pix_t const_in[NCOLOR];
  logic lane_pix[NCOLOR], lane_first[NCOLOR];
  pix_t lane_data;
  pix_t pad[NCOLOR];
  int   checks = 0, failures = 0;

  padding_data dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m_mode;
  pix_t m_const[NCOLOR], m_last[NCOLOR];

  initial begin
    load = 1'b0; mode_in = 1'b0; lane_data = '0;
    for (int c = 0; c < NCOLOR; c++) begin
      const_in[c] = '0; lane_pix[c] = 1'b0; lane_first[c] = 1'b0;
      m_const[c] = '0; m_last[c] = '0;
    end
    m_mode = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 2000; step++) begin
      // drive random inputs
      load    = ($urandom_range(0, 49) == 0);
      mode_in = 1'($urandom_range(0, 1));
      for (int c = 0; c < NCOLOR; c++) const_in[c] = pix_t'($urandom);
      lane_data = pix_t'($urandom);
      begin
        int lane;
        lane = $urandom_range(0, 3);  // 3 = no pixel this cycle
        for (int c = 0; c < NCOLOR; c++) begin
          lane_pix[c]   = (lane == c);
          lane_first[c] = (lane == c) && ($urandom_range(0, 4) == 0);
        end
      end
      #1;
      for (int c = 0; c < NCOLOR; c++) begin
        pix_t e;
        e = !m_mode ? m_const[c] : lane_first[c] ? lane_data : m_last[c];
        checks++;
        if (pad[c] != e) begin
          failures++;
          $display("step %0d lane %0d: pad %0d expected %0d", step, c, pad[c], e);
        end
      end
      @(negedge clk);
      // model update for the edge just passed
      if (load) begin
        m_mode = mode_in;
        for (int c = 0; c < NCOLOR; c++) m_const[c] = const_in[c];
      end
      for (int c = 0; c < NCOLOR; c++) if (lane_pix[c]) m_last[c] = lane_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
