// Testbench of diff_encoder: random raw bits; each encoded bit must equal the
// raw bit XOR the previous encoded bit, starting from 0 after clear.
`include "tb/tb_util.svh"
module tb_diff_encoder;
  logic clk = 0, rst_n = 1, clear = 0, en = 0, r = 0, e;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  diff_encoder dut (.*);
  `TB_WATCHDOG(5000)
  initial begin
    logic prev;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 4; pkt++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      prev = 0;
      for (int i = 0; i < 60; i++) begin
        r = 1'($urandom);
        en = ($urandom_range(0, 2) != 0);
        #1;
        `TB_CHECK(e == (r ^ prev), "E_n = R_n xor E_(n-1)")
        if (en) prev = r ^ prev;
        @(negedge clk);
      end
      en = 0;
    end
    `TB_FINISH
  end
endmodule
