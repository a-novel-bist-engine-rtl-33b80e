// tb_mem_bus_if: self-checking test of the memory write master.
//
// Offers random records with random bus grants and checks every granted
// write against a model: record n at base + 8n (word 0) and base + 8n + 4
// (word 1), in order, while fewer than `limit` records are stored; records
// beyond the window are accepted, dropped with a drop pulse, and raise full.
// A second run after clear must restart at base. With the grant always high a
// record takes two cycles (word 0, then word 1, whose grant also takes the
// next record), plus one cycle for the first; the time for a batch is
// checked against that.
module tb_mem_bus_if;
  import bist_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             clear;
  logic [BUS_W-1:0] base, limit;
  logic             in_valid, in_ready;
  logic [REC_W-1:0] in_data;
  logic             m_req, m_gnt;
  logic [BUS_W-1:0] m_addr, m_wdata, stored;
  logic             drop, full, idle;
  int               checks = 0, failures = 0, n_drop = 0, n_wr = 0;

  mem_bus_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BUS_W-1:0] exp_addr[$], exp_data[$];
  int               accepted;   // records accepted in this run
  int               exp_drops;
  logic             gnt_rand;

  // Bus monitor: compare each granted write.
  always @(posedge clk) if (rst_n) begin
    if (m_req && m_gnt) begin
      n_wr++;
      checks++;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("unexpected write %h %h", m_addr, m_wdata);
      end else begin
        logic [BUS_W-1:0] a, d;
        a = exp_addr.pop_front();
        d = exp_data.pop_front();
        if (m_addr != a || m_wdata != d) begin
          failures++;
          $display("write %h %h expected %h %h", m_addr, m_wdata, a, d);
        end
      end
    end
    if (drop) n_drop++;
  end

  // Grant driver (changes only at negedge, sampled at posedge).
  always @(negedge clk) m_gnt <= gnt_rand ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic offer(input int n, input bit gaps);
    for (int k = 0; k < n; k++) begin
      in_valid = 1'b1;
      in_data  = {$urandom, $urandom};
      do @(posedge clk); while (!in_ready);
      if (accepted < int'(limit)) begin
        exp_addr.push_back(base + 32'(8 * accepted));
        exp_data.push_back(in_data[31:0]);
        exp_addr.push_back(base + 32'(8 * accepted + 4));
        exp_data.push_back(in_data[63:32]);
      end else begin
        exp_drops++;
      end
      accepted++;
      @(negedge clk);
      in_valid = 1'b0;
      if (gaps && $urandom_range(0, 1) != 0) @(negedge clk);
    end
  endtask

  initial begin
    longint t0;
    clear = 1'b0; base = 32'h1000_0000; limit = 32'd20;
    in_valid = 1'b0; in_data = '0; gnt_rand = 1'b1;
    accepted = 0; exp_drops = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    offer(30, 1'b1);
    repeat (10) @(negedge clk);
    checks++;
    if (stored != 32'd20 || !full || exp_drops != 10 || n_drop != 10 || exp_addr.size() != 0) begin
      failures++;
      $display("run 1: stored %0d full %0b drops %0d/%0d pending %0d", stored, full, n_drop, exp_drops, exp_addr.size());
    end
    // second run: new window, grant always high, measure the rate
    base = 32'h2000_0100; limit = 32'd1000; gnt_rand = 1'b0;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    accepted = 0;
    checks++;
    if (stored != 0 || full) begin
      failures++;
      $display("clear did not reset the window");
    end
    @(negedge clk);
    t0 = $time;
    offer(16, 1'b0);
    wait (idle);
    @(negedge clk);
    checks++;
    if (($time - t0) / 10 != 2 * 16 + 1 || stored != 32'd16) begin
      failures++;
      $display("16 records took %0d cycles, stored %0d", ($time - t0) / 10, stored);
    end
    checks++;
    if (exp_addr.size() != 0) begin
      failures++;
      $display("%0d writes missing", exp_addr.size());
    end
    $display("writes %0d drops %0d", n_wr, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
