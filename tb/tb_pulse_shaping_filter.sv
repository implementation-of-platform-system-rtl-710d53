// Testbench of pulse_shaping_filter: random chips at 10 samples per chip.
// The expected output is the convolution of the +/-1 chip impulses with the
// raised cosine p(t) = sinc(t/Tc) cos(pi t/Tc)/(1-4t^2/Tc^2), computed here
// in floating point, scaled by 240, rounded per tap and shifted right by 3.
`include "tb/tb_util.svh"
module tb_pulse_shaping_filter;
  logic clk = 0, rst_n = 1, sample_tick = 0, chip_tick = 0, chip = 0, chip_valid = 0;
  logic signed [5:0] dac;
  logic active;
  int checks = 0, failures = 0;
  int h[61];
  int cv[$];   // chip values seen by the filter, +1/-1/0
  always #5 clk = ~clk;
  pulse_shaping_filter #(.DAC_W(6)) dut (.*);
  `TB_WATCHDOG(200000)

  localparam real PI = 3.14159265358979;

  initial begin
    int nchip, ph, expv, maxabs;
    for (int n = 0; n < 61; n++) begin
      real v, t, x;
      t = (n - 30) / 10.0;
      x = PI * t;
      if (n == 30) v = 1.0;
      else if (n == 25 || n == 35) v = PI / 4.0 * $sin(x) / x;
      else v = $sin(x) / x * $cos(x) / (1.0 - 4.0 * t * t);
      v = v * 240.0;
      h[n] = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
    end
    `TB_CHECK(h[30] == 240 && h[40] == 0 && h[35] == 120, "tap values")
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nchip = 0; maxabs = 0;
    for (int s = 0; s < 10 * 80; s++) begin
      @(negedge clk);
      sample_tick = 1;
      chip_tick = (s % 10 == 0);
      if (chip_tick) begin
        // the filter takes the chip presented before this tick
        cv.push_front(chip_valid ? (chip ? 1 : -1) : 0);
      end
      @(negedge clk);
      sample_tick = 0; chip_tick = 0;
      if (s % 10 == 0) begin
        chip_valid = (nchip < 60);
        chip = 1'($urandom);
        nchip++;
      end
      @(negedge clk);
      ph = s % 10;
      expv = 0;
      for (int j = 0; j < 7; j++)
        if (ph + 10 * j <= 60 && j < cv.size()) expv += cv[j] * h[ph + 10 * j];
      expv = expv >>> 3;
      `TB_CHECK(dac == expv, $sformatf("sample %0d: dac %0d exp %0d", s, dac, expv))
      if (dac > maxabs) maxabs = dac;
    end
    `TB_CHECK(maxabs > 20, "output swing")
    `TB_CHECK(!active, "filter empties after the last chip")
    `TB_FINISH
  end
endmodule
