// Testbench of timing_control: measures the spacing of sample and chip strobes
// for both bands at 12 MHz (expected 4 and 40 clocks at 868 MHz, 2 and 20
// clocks at 915 MHz, i.e. 3 and 6 Msample/s, 300 and 600 kchip/s).
`include "tb/tb_util.svh"
module tb_timing_control;
  logic clk = 0, rst_n = 1, band_915 = 0;
  logic sample_tick, chip_tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  timing_control dut (.*);
  `TB_WATCHDOG(20000)

  task automatic measure(input int exp_s, input int exp_c);
    int last_s, last_c, n, nc, cyc;
    last_s = -1; last_c = -1; n = 0; nc = 0; cyc = 0;
    while (nc < 6) begin
      @(posedge clk);
      cyc++;
      if (sample_tick) begin
        if (last_s >= 0) `TB_CHECK(cyc - last_s == exp_s, "sample spacing")
        last_s = cyc;
      end
      if (chip_tick) begin
        `TB_CHECK(sample_tick, "chip tick without sample tick")
        if (last_c >= 0) `TB_CHECK(cyc - last_c == exp_c, "chip spacing")
        last_c = cyc;
        nc++;
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(4, 40);
    band_915 = 1;
    repeat (50) @(posedge clk);
    measure(2, 20);
    `TB_FINISH
  end
endmodule
