// tb_csr_bus_if: self-checking test of the register slave port.
//
// A CPU model issues random reads and writes, holding each request until the
// acknowledge. The register side is a small model register file. Checks: each
// request causes exactly one register access, in the cycle it is first seen;
// the acknowledge comes one cycle later (two for a request raised in the
// previous acknowledge cycle); reads return the model's data;
// misaligned or out-of-range addresses cause no access, s_err and data 0.
module tb_csr_bus_if;
  import bist_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             s_req, s_we, s_ack, s_err;
  logic [BUS_W-1:0] s_addr, s_wdata, s_rdata;
  logic             reg_wr, reg_rd;
  csr_idx_e         reg_idx;
  logic [BUS_W-1:0] reg_wdata, reg_rdata;
  int               checks = 0, failures = 0, n_err = 0, n_acc = 0;

  csr_bus_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BUS_W-1:0] regs[NREGS];
  assign reg_rdata = reg_rd ? regs[reg_idx] : '0;
  always @(posedge clk) begin
    if (reg_wr) regs[reg_idx] <= reg_wdata;
    if (reg_wr || reg_rd) n_acc++;
  end

  initial begin
    s_req = 1'b0; s_we = 1'b0; s_addr = '0; s_wdata = '0;
    for (int i = 0; i < NREGS; i++) regs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      logic bad;
      int   acc0, cyc, exp_cyc;
      logic [BUS_W-1:0] expect_rd;
      s_we    = 1'($urandom_range(0, 1));
      s_addr  = ($urandom_range(0, 9) == 0) ? 32'($urandom_range(0, 255))
                                            : 32'(4 * $urandom_range(0, NREGS - 1));
      s_wdata = $urandom;
      bad = (s_addr[1:0] != 0) || (s_addr >= 4 * NREGS);
      expect_rd = (bad || s_we) ? '0 : regs[s_addr[5:2]];
      acc0 = n_acc;
      // a request raised while the previous acknowledge is still high waits one cycle
      exp_cyc = s_ack ? 2 : 1;
      s_req = 1'b1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!s_ack && cyc < 10);
      checks++;
      if (cyc != exp_cyc || s_err != bad || s_rdata != expect_rd || n_acc - acc0 != (bad ? 0 : 1)) begin
        failures++;
        $display("req %0d addr %h we %0b: ack after %0d, err %0b, rdata %h/%h, accesses %0d",
                 k, s_addr, s_we, cyc, s_err, s_rdata, expect_rd, n_acc - acc0);
      end
      if (!bad && s_we) begin
        checks++;
        if (regs[s_addr[5:2]] != s_wdata) begin
          failures++;
          $display("write to %h lost", s_addr);
        end
      end
      if (s_err) n_err++;
      s_req = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("no error response exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
