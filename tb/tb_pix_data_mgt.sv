// tb_pix_data_mgt: self-checking test of the pixel steering block.
//
// Streams frames of several sizes (some pixels before the start-of-frame flag,
// random blanking between rows of at least HALF+1 cycles) and checks, cycle
// by cycle, that each pixel appears one cycle later as a beat on the lane of
// its RGGB colour only, with its row, column, first flag and padding value;
// that each row ends with HALF flush beats and one end-of-row beat on exactly
// the lanes that received pixels; that frame_done pulses with the last
// end-of-row beat; and that a pixel sent during the blanking is dropped and
// reported on stream_err.
module tb_pix_data_mgt;
  import bist_pkg::*;
  localparam int HALF = 2;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   enable;
  coord_t width, height;
  logic   pix_valid, pix_sof;
  pix_t   pix_data;
  logic   lane_pix[NCOLOR], lane_first[NCOLOR];
  pix_t   lane_data, pad[NCOLOR];
  beat_t  beat[NCOLOR];
  logic   busy, frame_done, stream_err;
  int     checks = 0, failures = 0;
  int     n_flush = 0, n_eol = 0, n_err = 0, n_done = 0;

  pix_data_mgt #(.HALF(HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs for the step just driven
  beat_t exp_b[NCOLOR];
  logic  exp_done, exp_err;

  task automatic check_step();
    @(negedge clk);
    for (int c = 0; c < NCOLOR; c++) begin
      checks++;
      if (beat[c].pix != exp_b[c].pix || beat[c].first != exp_b[c].first ||
          beat[c].flush != exp_b[c].flush || beat[c].eol != exp_b[c].eol ||
          (exp_b[c].pix && (beat[c].data != exp_b[c].data || beat[c].row != exp_b[c].row ||
                            beat[c].col != exp_b[c].col)) ||
          ((exp_b[c].first || exp_b[c].flush) && beat[c].pad != exp_b[c].pad)) begin
        failures++;
        $display("lane %0d: got %p expected %p", c, beat[c], exp_b[c]);
      end
      if (beat[c].flush) n_flush++;
      if (beat[c].eol) n_eol++;
    end
    checks++;
    if (frame_done != exp_done || stream_err != exp_err) begin
      failures++;
      $display("frame_done %0b/%0b stream_err %0b/%0b", frame_done, exp_done, stream_err, exp_err);
    end
    if (stream_err) n_err++;
    if (frame_done) n_done++;
  endtask

  task automatic clear_exp();
    for (int c = 0; c < NCOLOR; c++) exp_b[c] = '0;
    exp_done = 1'b0;
    exp_err  = 1'b0;
  endtask

  task automatic idle(input int n);
    for (int k = 0; k < n; k++) begin
      pix_valid = 1'b0;
      pix_sof   = 1'b0;
      clear_exp();
      check_step();
    end
  endtask

  task automatic run_frame(input int w, input int h, input bit inject);
    logic [NCOLOR-1:0] seen;
    // pixels of the previous frame, before the start: ignored
    for (int k = 0; k < 3; k++) begin
      pix_valid = 1'b1; pix_sof = 1'b0; pix_data = pix_t'($urandom);
      clear_exp();
      check_step();
    end
    for (int r = 0; r < h; r++) begin
      seen = '0;
      for (int col = 0; col < w; col++) begin
        color_e cc;
        pix_valid = 1'b1;
        pix_sof   = (r == 0 && col == 0);
        pix_data  = pix_t'($urandom);
        cc = bayer_color(r[0], col[0]);
        clear_exp();
        exp_b[cc].pix   = 1'b1;
        exp_b[cc].first = (col < 2);
        exp_b[cc].data  = pix_data;
        exp_b[cc].row   = coord_t'(r);
        exp_b[cc].col   = coord_t'(col);
        exp_b[cc].pad   = pad[cc];
        seen[cc] = 1'b1;
        check_step();
      end
      for (int k = 0; k <= HALF; k++) begin
        pix_valid = inject && (r == 0) && (k == 1);
        pix_sof   = 1'b0;
        pix_data  = pix_t'($urandom);
        clear_exp();
        exp_err = pix_valid;
        for (int c = 0; c < NCOLOR; c++) begin
          exp_b[c].flush = (k < HALF) && seen[c];
          exp_b[c].pad   = pad[c];
          exp_b[c].eol   = (k == HALF) && seen[c];
        end
        exp_done = (k == HALF) && (r == h - 1);
        check_step();
      end
      idle($urandom_range(0, 3));
    end
  endtask

  initial begin
    enable = 1'b0; width = '0; height = '0;
    pix_valid = 1'b0; pix_sof = 1'b0; pix_data = '0;
    pad[0] = 10'd101; pad[1] = 10'd202; pad[2] = 10'd303;
    clear_exp();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    idle(2);
    for (int f = 0; f < 4; f++) begin
      int w, h;
      w = (f == 0) ? 2 : $urandom_range(3, 17);
      h = (f == 0) ? 1 : $urandom_range(1, 6);
      width  = coord_t'(w);
      height = coord_t'(h);
      enable = 1'b1;
      idle(2);
      run_frame(w, h, f == 2);
      checks++;
      if (busy) begin
        failures++;
        $display("busy after the frame");
      end
      // after the frame, further pixels are ignored until re-enabled
      pix_valid = 1'b1; pix_sof = 1'b1;
      clear_exp();
      check_step();
      enable = 1'b0;
      idle(2);
    end
    checks++;
    if (n_done != 4 || n_err != 1 || n_flush == 0 || n_eol == 0) begin
      failures++;
      $display("counts: done %0d err %0d flush %0d eol %0d", n_done, n_err, n_flush, n_eol);
    end
    $display("frames %0d stream errors %0d flush beats %0d eol beats %0d", n_done, n_err, n_flush, n_eol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
