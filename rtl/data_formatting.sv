// data_formatting: collects the defect records of the three colour detectors
// and encodes them for memory.
//
// Each detector emits at most one record per cycle, but at row ends two lanes
// can report in the same cycle, so every lane has its own FIFO of FIFO_DEPTH
// records. A round-robin arbiter picks the next non-empty lane and the record
// is packed into the two-word memory layout of bist_pkg (type, value and
// coordinates, as the document lists; the word layout is this design's own).
// A record that meets a full FIFO is dropped and signalled on ovf[c] so the
// loss is counted; the FIFOs and the dropping are this design's choice.
//
// clear (start of a run) discards everything buffered, so records left by an
// aborted run never reach the next run's memory window.
//
// Output: valid/ready; out_data is stable while out_valid && !out_ready.
// Latency: a record can leave the cycle after it entered a FIFO.
module data_formatting
  import bist_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid[NCOLOR],
  input  defect_t          in_rec  [NCOLOR],
  output logic             ovf     [NCOLOR],
  output logic             out_valid,
  output logic [REC_W-1:0] out_data,
  input  logic             out_ready,
  output logic             empty
);
  localparam int DW = $bits(defect_t);

  logic [DW-1:0]     head [NCOLOR];
  logic [NCOLOR-1:0] fempty, ffull, pop;
  logic [1:0]        rr;         // lane with priority this cycle
  logic [1:0]        sel;
  logic              any;

  for (genvar c = 0; c < NCOLOR; c++) begin : g_lane
    sync_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clear,
      .push (in_valid[c]),
      .wdata(in_rec[c]),
      .pop  (pop[c]),
      .rdata(head[c]),
      .empty(fempty[c]),
      .full (ffull[c])
    );
    assign ovf[c] = in_valid[c] && ffull[c];
  end

  // Round-robin: search from rr upward, wrapping.
  always_comb begin
    any = 1'b0;
    sel = rr;
    for (int k = NCOLOR - 1; k >= 0; k--) begin
      logic [1:0] lane;
      lane = 2'((int'(rr) + k) % NCOLOR);
      if (!fempty[lane]) begin
        any = 1'b1;
        sel = lane;
      end
    end
  end

  logic out_free;
  assign out_free = !out_valid || out_ready;

  always_comb begin
    pop = '0;
    if (any && out_free) pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      rr        <= '0;
      out_valid <= 1'b0;
    end else if (out_free) begin
      out_valid <= any;
      if (any) begin
        out_data <= format_record(defect_t'(head[sel]));
        rr       <= (sel == 2'(NCOLOR - 1)) ? '0 : sel + 1'b1;
      end
    end
  end

  assign empty = (&fempty) && !out_valid;

  assert property (@(posedge clk) disable iff (!rst_n || clear)
                   out_valid && !out_ready && !clear |=> out_valid && $stable(out_data));

endmodule
