// Testbench of dc_offset_comp: a +/-5 square wave on I and a +/-4 one on Q,
// both with a DC offset of +3 / -2. The first output equals the input (the
// estimate starts at zero); after settling the output mean must be near zero
// and the wave's amplitude kept. The estimator is checked against a model of
// the integrator acc += x - (acc >>> 6).
`include "tb/tb_util.svh"
module tb_dc_offset_comp;
  logic clk = 0, rst_n = 1, en = 0;
  logic signed [3:0] in_i = 0, in_q = 0;
  logic signed [5:0] out_i, out_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dc_offset_comp #(.ADC_W(4), .OUT_W(6), .K(6)) dut (.*);
  `TB_WATCHDOG(50000)
  initial begin
    int acc_i, acc_q, exp_i, exp_q, sum_i, sum_q;
    acc_i = 0; acc_q = 0; sum_i = 0; sum_q = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_i = 4'(((n / 3) % 2 ? 5 : -5) + 3);
      in_q = 4'(((n / 5) % 2 ? 4 : -4) - 2);
      en = 1;
      exp_i = in_i - (acc_i >>> 6);
      exp_q = in_q - (acc_q >>> 6);
      acc_i = acc_i + in_i - (acc_i >>> 6);
      acc_q = acc_q + in_q - (acc_q >>> 6);
      @(negedge clk);
      en = 0;
      `TB_CHECK(out_i == exp_i && out_q == exp_q, "output vs integrator model")
      if (n == 0) `TB_CHECK(out_i == -2 && out_q == -6, "first sample passes")
      if (n >= 2000) begin sum_i += out_i; sum_q += out_q; end
    end
    `TB_CHECK(sum_i < 1000 && sum_i > -1000, "I mean removed (|mean| < 1)")
    `TB_CHECK(sum_q < 1000 && sum_q > -1000, "Q mean removed (|mean| < 1)")
    `TB_FINISH
  end
endmodule
