// Testbench of sync_fifo: random pushes and pops against a queue model,
// checking data order, count, full/empty flags and flush.
`include "tb/tb_util.svh"
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 1, flush = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wdata, rdata;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  byte unsigned q[$];
  always #5 clk = ~clk;
  sync_fifo #(.DEPTH(D), .WIDTH(8)) dut (.*);
  `TB_WATCHDOG(10000)

  initial begin
    wdata = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      `TB_CHECK(count == q.size(), "count")
      `TB_CHECK(empty == (q.size() == 0), "empty")
      `TB_CHECK(full == (q.size() == D), "full")
      if (q.size() > 0) `TB_CHECK(rdata == q[0], "head data")
      wr_en = ($urandom_range(0, 99) < (t < 1000 ? 60 : 40));
      rd_en = ($urandom_range(0, 99) < 50);
      flush = (t == 1500);
      wdata = 8'($urandom);
      begin
        bit wr_ok, rd_ok;
        wr_ok = wr_en && q.size() < D;
        rd_ok = rd_en && q.size() > 0;
        @(posedge clk);
        #1;
        if (flush) q.delete();
        else begin
          if (rd_ok) void'(q.pop_front());
          if (wr_ok) q.push_back(wdata);
        end
      end
    end
    `TB_FINISH
  end
endmodule
