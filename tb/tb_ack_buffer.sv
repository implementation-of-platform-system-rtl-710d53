// Testbench of ack_buffer: fills an acknowledgement, reads it twice after
// rewinding (non-destructive), checks the fill level, overflow and clear.
`include "tb/tb_util.svh"
module tb_ack_buffer;
  logic clk = 0, rst_n = 1, clr = 0, wr_en = 0, rd_rewind = 0, rd_en = 0;
  logic [7:0] wdata = 0, rdata;
  logic [3:0] fill;
  int checks = 0, failures = 0;
  byte unsigned ref_data[8];
  always #5 clk = ~clk;
  ack_buffer #(.DEPTH(8)) dut (.*);
  `TB_WATCHDOG(5000)

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      int n;
      n = (round == 2) ? 10 : 4 + round;
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      `TB_CHECK(fill == 0, "cleared")
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        wr_en = 1; wdata = 8'($urandom);
        if (i < 8) ref_data[i] = wdata;
      end
      @(negedge clk) wr_en = 0;
      `TB_CHECK(fill == 4'((n > 8) ? 8 : n), "fill level")
      for (int pass = 0; pass < 2; pass++) begin
        @(negedge clk) rd_rewind = 1;
        @(negedge clk) rd_rewind = 0;
        for (int i = 0; i < ((n > 8) ? 8 : n); i++) begin
          `TB_CHECK(rdata == ref_data[i], "read data")
          @(negedge clk) rd_en = 1;
          @(negedge clk) rd_en = 0;
        end
      end
    end
    `TB_FINISH
  end
endmodule
