// Testbench of chip_timing_recovery: a chip stream whose pulses peak at
// sample phase PEAK of each 10-sample chip (triangular pulse shape, random
// chip signs). After the first 15-chip window the block must select PEAK and
// then deliver exactly one sample per chip: the peak sample.
`include "tb/tb_util.svh"
module tb_chip_timing_recovery;
  logic clk = 0, rst_n = 1, en = 0;
  logic signed [5:0] in_i = 0, in_q = 0;
  logic chip_valid;
  logic signed [5:0] chip_i, chip_q;
  logic [3:0] phase;
  logic settled;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  chip_timing_recovery #(.IN_W(6), .OSR(10), .WIN(15)) dut (.*);
  `TB_WATCHDOG(100000)
  initial begin
    int peak, amp, d, sgn_i, sgn_q, nvalid;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      peak = (trial == 0) ? 6 : (trial == 1) ? 2 : 9;
      nvalid = 0;
      for (int c = 0; c < 45; c++) begin
        sgn_i = $urandom_range(0, 1) ? 1 : -1;
        sgn_q = $urandom_range(0, 1) ? 1 : -1;
        for (int p = 0; p < 10; p++) begin
          d = (p > peak) ? p - peak : peak - p;
          if (d > 5) d = 10 - d;
          amp = 15 - 3 * d;
          @(negedge clk);
          in_i = 6'(sgn_i * amp); in_q = 6'(sgn_q * (amp / 2));
          en = 1;
          @(negedge clk);
          en = 0;
          if (chip_valid) begin
            if (c >= 16) begin
              `TB_CHECK(chip_i == 15 * sgn_i && chip_q == 7 * sgn_q, "peak sample delivered")
              nvalid++;
            end
          end
        end
      end
      `TB_CHECK(settled, "settled after two equal windows")
      `TB_CHECK(phase == 4'(peak), $sformatf("selected phase %0d, peak %0d", phase, peak))
      `TB_CHECK(nvalid == 45 - 16, "one sample per chip")
    end
    `TB_FINISH
  end
endmodule
