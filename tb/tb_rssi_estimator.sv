// Testbench of rssi_estimator: constant and random I/Q; each new RSSI must be
// the mean of I^2+Q^2 over the last 150 samples (the reciprocal multiply may
// differ from exact division by at most 1), and new values must come every
// 150 samples.
`include "tb/tb_util.svh"
module tb_rssi_estimator;
  logic clk = 0, rst_n = 1, en = 0;
  logic signed [5:0] in_i = 0, in_q = 0;
  logic [7:0] rssi;
  logic valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rssi_estimator #(.IN_W(6)) dut (.*);
  `TB_WATCHDOG(100000)
  initial begin
    int sum, n, last_v, exp_v;
    sum = 0; n = 0; last_v = -1;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 150 * 8; s++) begin
      @(negedge clk);
      if (s < 300) begin in_i = 3; in_q = -4; end
      else if (s < 600) begin in_i = 6'($urandom_range(0, 20) - 10); in_q = 6'($urandom_range(0, 20) - 10); end
      else begin in_i = 31; in_q = -32; end
      en = 1;
      sum += in_i * in_i + in_q * in_q;
      n++;
      @(negedge clk);
      en = 0;
      if (valid) begin
        `TB_CHECK(n == 150, "one value per 150 samples")
        exp_v = sum / 150;
        if (exp_v > 255) exp_v = 255;
        `TB_CHECK(rssi == exp_v || rssi == exp_v + 1 || rssi == exp_v - 1, $sformatf("rssi %0d exp %0d", rssi, exp_v))
        if (s < 300) `TB_CHECK(rssi == 25, "3,-4 gives 25")
        sum = 0; n = 0;
      end
    end
    `TB_CHECK(rssi == 255, "saturation")
    `TB_FINISH
  end
endmodule
