// csr_bus_if: system-bus slave in front of the control and status registers.
//
// The CPU raises s_req with s_we, s_addr (byte address) and s_wdata and holds
// them until s_ack. The interface performs the register access in the cycle
// it first sees the request (reg_wr or reg_rd for one cycle, reg_idx = word
// index), and answers one cycle later with s_ack, the read data and s_err. An
// address that is not word-aligned or beyond the NREGS registers is not
// passed on and is answered with s_err and read data 0. The request seen in
// the acknowledge cycle is the one already served and is ignored. The bus
// protocol is this design's choice; the document only shows the block.
module csr_bus_if
  import bist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // system bus slave
  input  logic             s_req,
  input  logic             s_we,
  input  logic [BUS_W-1:0] s_addr,
  input  logic [BUS_W-1:0] s_wdata,
  output logic             s_ack,
  output logic             s_err,
  output logic [BUS_W-1:0] s_rdata,
  // register file side
  output logic             reg_wr,
  output logic             reg_rd,
  output csr_idx_e         reg_idx,
  output logic [BUS_W-1:0] reg_wdata,
  input  logic [BUS_W-1:0] reg_rdata
);
  logic start, bad;

  assign start     = s_req && !s_ack;
  assign bad       = (s_addr[1:0] != 2'b00) || (s_addr[BUS_W-1:2] >= (BUS_W-2)'(NREGS));
  assign reg_wr    = start && s_we && !bad;
  assign reg_rd    = start && !s_we && !bad;
  assign reg_idx   = csr_idx_e'(s_addr[5:2]);
  assign reg_wdata = s_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack   <= 1'b0;
      s_err   <= 1'b0;
      s_rdata <= '0;
    end else begin
      s_ack   <= start;
      s_err   <= start && bad;
      s_rdata <= (start && !s_we && !bad) ? reg_rdata : '0;
    end
  end

  // Every new request is acknowledged in the next cycle, and only requests are.
  assert property (@(posedge clk) disable iff (!rst_n) start |=> s_ack);
  assert property (@(posedge clk) disable iff (!rst_n) s_ack |-> $past(start));

endmodule
