// tb_bist_fsm: self-checking test of the run sequencer.
//
// Walks the FSM through full runs and checks every state and output on the
// way: start -> LOAD for one cycle (load high) -> ARMED (pix_enable) -> RUN
// when the frame begins -> DRAIN on frame_done, which must last at least
// DRAIN_CYCLES cycles and then wait for the formatting FIFOs and the memory
// master -> DONE with one irq pulse. Also checks that start is ignored while
// busy and that abort returns to IDLE from the middle of a run.
module tb_bist_fsm;
  import bist_pkg::*;
  localparam int DRAIN = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start, abort_req, pix_busy, frame_done, fmt_empty, mem_idle;
  bist_state_e state;
  logic        load, pix_enable, busy, done, irq;
  int          checks = 0, failures = 0, n_irq = 0;

  bist_fsm #(.DRAIN_CYCLES(DRAIN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (irq) n_irq++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input bist_state_e s, input string what);
    checks++;
    if (state != s || load != (s == ST_LOAD) || pix_enable != (s == ST_ARMED || s == ST_RUN) ||
        busy != (s != ST_IDLE && s != ST_DONE) || done != (s == ST_DONE)) begin
      failures++;
      $display("%s: state %0d expected %0d (load %0b en %0b busy %0b done %0b)",
               what, state, s, load, pix_enable, busy, done);
    end
  endtask

  task automatic step();
    @(negedge clk);
  endtask

  initial begin
    start = 0; abort_req = 0; pix_busy = 0; frame_done = 0; fmt_empty = 1; mem_idle = 1;
    repeat (2) step();
    rst_n = 1'b1;
    step();
    expect_state(ST_IDLE, "after reset");
    for (int run = 0; run < 3; run++) begin
      int wait_cyc, irq0;
      irq0 = n_irq;
      start = 1; step(); start = 0;
      expect_state(ST_LOAD, "load");
      step();
      expect_state(ST_ARMED, "armed");
      repeat (3) step();
      expect_state(ST_ARMED, "still armed");
      pix_busy = 1; step();
      expect_state(ST_RUN, "run");
      start = 1; step(); start = 0;
      expect_state(ST_RUN, "start ignored while running");
      repeat (5) step();
      pix_busy = 0; frame_done = 1; step(); frame_done = 0;
      expect_state(ST_DRAIN, "drain");
      fmt_empty = (run != 1);
      mem_idle = (run != 2);
      wait_cyc = 0;
      while (state == ST_DRAIN && wait_cyc < 50) begin
        step();
        wait_cyc++;
        if (wait_cyc == 10) begin fmt_empty = 1; mem_idle = 1; end
      end
      checks++;
      if (wait_cyc != ((run == 0) ? DRAIN + 1 : 11)) begin
        failures++;
        $display("run %0d: drain took %0d cycles", run, wait_cyc);
      end
      expect_state(ST_DONE, "done");
      repeat (3) step();
      expect_state(ST_DONE, "done holds");
      checks++;
      if (n_irq != irq0 + 1) begin
        failures++;
        $display("run %0d: %0d irq pulses", run, n_irq - irq0);
      end
    end
    // abort in the middle of a run
    start = 1; step(); start = 0;
    step(); pix_busy = 1; step();
    expect_state(ST_RUN, "run before abort");
    abort_req = 1; step(); abort_req = 0; pix_busy = 0;
    expect_state(ST_IDLE, "aborted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
