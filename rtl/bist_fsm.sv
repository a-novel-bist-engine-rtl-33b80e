// bist_fsm: sequences one BIST run over one frame.
//
// IDLE --start--> LOAD (one cycle: clear counters and the memory pointer,
// latch the padding setup) --> ARMED (pixel steering enabled, waiting for the
// start of a frame) --frame begins--> RUN --last row evaluated--> DRAIN
// (DRAIN_CYCLES cycles for the detector pipelines, then until the formatting
// FIFOs are empty and the last memory write is granted) --> DONE, where done
// stays high and irq pulses once. start in DONE begins a new run; abort
// returns to IDLE from any state. The document names the FSM without giving
// its states; this sequence is this design's choice, made so that the CPU is
// told only when every record of the frame is in memory.
module bist_fsm
  import bist_pkg::*;
#(
  parameter int DRAIN_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        abort_req,
  input  logic        pix_busy,
  input  logic        frame_done,
  input  logic        fmt_empty,
  input  logic        mem_idle,
  output bist_state_e state,
  output logic        load,
  output logic        pix_enable,
  output logic        busy,
  output logic        done,
  output logic        irq
);
  localparam int DC_W = $clog2(DRAIN_CYCLES + 1);
  logic [DC_W-1:0] dcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      dcnt  <= '0;
      irq   <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (abort_req) begin
        state <= ST_IDLE;
      end else begin
        unique case (state)
          ST_IDLE, ST_DONE: if (start) state <= ST_LOAD;
          ST_LOAD:  state <= ST_ARMED;
          ST_ARMED: if (frame_done) begin
            state <= ST_DRAIN;
            dcnt  <= '0;
          end else if (pix_busy) begin
            state <= ST_RUN;
          end
          ST_RUN: if (frame_done) begin
            state <= ST_DRAIN;
            dcnt  <= '0;
          end
          ST_DRAIN: begin
            if (dcnt != DC_W'(DRAIN_CYCLES)) dcnt <= dcnt + 1'b1;
            else if (fmt_empty && mem_idle) begin
              state <= ST_DONE;
              irq   <= 1'b1;
            end
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  assign load       = (state == ST_LOAD);
  assign pix_enable = (state == ST_ARMED) || (state == ST_RUN);
  assign busy       = (state != ST_IDLE) && (state != ST_DONE);
  assign done       = (state == ST_DONE);

endmodule
