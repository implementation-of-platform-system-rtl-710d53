// Testbench of phase_error_detector: exhaustive over 8-bit I and Q, the error
// must be Q for I >= 0 and -Q for I < 0.
`include "tb/tb_util.svh"
module tb_phase_error_detector;
  logic clk = 0;
  logic signed [7:0] i, q, err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  phase_error_detector #(.W(8)) dut (.*);
  `TB_WATCHDOG(1000)
  initial begin
    for (int a = -127; a <= 127; a += 3)
      for (int b = -127; b <= 127; b += 5) begin
        i = 8'(a); q = 8'(b);
        #1;
        `TB_CHECK(err == ((a >= 0) ? b : -b), "sign(I)*Q")
      end
    `TB_FINISH
  end
endmodule
