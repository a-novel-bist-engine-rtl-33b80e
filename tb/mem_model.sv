// mem_model: behavioural system memory for the testbenches (not part of the
// design). Accepts word writes on a request/grant port; the grant is random
// with probability gnt_pct percent (100 = always), so the BIST's write master
// sees bus stalls. Written words are kept in an associative array `mem`,
// which testbenches read hierarchically; `stalls` counts cycles a request
// waited.
module mem_model #(
  parameter int AW = 32,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          req,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          gnt,
  input  int            gnt_pct
);
  logic [DW-1:0] mem[logic [AW-1:0]];
  int            stalls = 0;
  int            writes = 0;

  initial gnt = 1'b0;

  always @(negedge clk) gnt = ($urandom_range(0, 99) < gnt_pct);

  always @(posedge clk) begin
    if (req && gnt) begin
      mem[addr] = wdata;
      writes++;
    end
    if (req && !gnt) stalls++;
  end
endmodule
