// mem_bus_if: system-bus write master that stores defect records in memory.
//
// Each 64-bit record from data_formatting is written as two 32-bit words at
// consecutive addresses: record n goes to base + 8n (word 0) and base + 8n + 4
// (word 1). The write window holds `limit` records; once it is full further
// records are accepted and discarded, `drop` pulses for each and `full` is
// raised, so the frame is still evaluated to the end. `clear` (start of a
// run) resets the record pointer and the full flag. The bus itself is not
// described by the document; this port is this design's choice.
//
// Bus handshake: m_req is held with m_addr and m_wdata stable until m_gnt is
// high in the same cycle; the word is written on that edge. A record takes
// two grants. in_ready is high when no write is in progress and also in the
// cycle whose grant completes a record's second word, so with the grant held
// high records stream at one per two cycles.
module mem_bus_if
  import bist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [BUS_W-1:0] base,
  input  logic [BUS_W-1:0] limit,
  // records in
  input  logic             in_valid,
  input  logic [REC_W-1:0] in_data,
  output logic             in_ready,
  // system bus write master
  output logic             m_req,
  output logic [BUS_W-1:0] m_addr,
  output logic [BUS_W-1:0] m_wdata,
  input  logic             m_gnt,
  // status
  output logic [BUS_W-1:0] stored,
  output logic             drop,
  output logic             full,
  output logic             idle
);
  typedef enum logic [1:0] {W_IDLE, W_WORD0, W_WORD1} wstate_e;

  wstate_e          state;
  logic [BUS_W-1:0] word1_q;

  logic last_word;     // second word granted this cycle
  logic accept;        // a record is taken this cycle

  assign last_word = (state == W_WORD1) && m_gnt;
  assign in_ready  = ((state == W_IDLE) || last_word) && !clear;
  assign accept    = in_valid && in_ready;
  assign m_req    = (state != W_IDLE);
  assign idle     = (state == W_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= W_IDLE;
      m_addr  <= '0;
      m_wdata <= '0;
      word1_q <= '0;
      stored  <= '0;
      drop    <= 1'b0;
      full    <= 1'b0;
    end else begin
      drop <= 1'b0;
      if (clear) begin
        state  <= W_IDLE;
        stored <= '0;
        full   <= 1'b0;
      end else begin
        if (last_word) stored <= stored + 1'b1;
        if (state == W_WORD0 && m_gnt) begin
          m_addr  <= m_addr + 'd4;
          m_wdata <= word1_q;
          state   <= W_WORD1;
        end else if (state == W_WORD1 && !m_gnt) begin
          state <= W_WORD1;
        end else if (state != W_WORD0) begin
          // idle, or the last word is granted now: take the next record
          state <= W_IDLE;
          if (accept) begin
            if (stored + BUS_W'(last_word) < limit) begin
              m_addr  <= base + ((stored + BUS_W'(last_word)) << 3);
              m_wdata <= in_data[BUS_W-1:0];
              word1_q <= in_data[REC_W-1:BUS_W];
              state   <= W_WORD0;
            end else begin
              drop <= 1'b1;
              full <= 1'b1;
            end
          end
        end
      end
    end
  end

  // Address and data hold while a request waits for its grant.
  assert property (@(posedge clk) disable iff (!rst_n || clear)
                   m_req && !m_gnt |=> m_req && $stable(m_addr) && $stable(m_wdata));

endmodule
