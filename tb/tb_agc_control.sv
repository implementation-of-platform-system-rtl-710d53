// Testbench of agc_control: gain starts at 100 dB; a strong RSSI steps it down
// 1 dB per update to 10 dB; a weak one steps it up to 100 dB; inside the
// hysteresis band and while frozen it holds.
`include "tb/tb_util.svh"
module tb_agc_control;
  logic clk = 0, rst_n = 1, rssi_valid = 0, freeze = 0;
  logic [7:0] rssi = 0;
  logic [6:0] gain;
  logic step_up, step_down;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  agc_control #(.GAIN_MIN(10), .GAIN_MAX(100), .TARGET(24), .HYST(8)) dut (.*);
  `TB_WATCHDOG(10000)
  task automatic upd(input int r, input int exp_g);
    @(negedge clk) rssi = 8'(r); rssi_valid = 1;
    @(negedge clk) rssi_valid = 0;
    `TB_CHECK(gain == exp_g, $sformatf("gain %0d exp %0d (rssi %0d)", gain, exp_g, r))
  endtask
  initial begin
    int g;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `TB_CHECK(gain == 100, "reset gain")
    g = 100;
    for (int i = 0; i < 95; i++) begin g = (g > 10) ? g - 1 : 10; upd(200, g); end
    upd(24, 10); upd(31, 10); upd(17, 10);
    g = 10;
    for (int i = 0; i < 50; i++) begin g++; upd(3, g); end
    freeze = 1;
    upd(3, g); upd(250, g);
    freeze = 0;
    for (int i = 0; i < 50; i++) begin g = (g < 100) ? g + 1 : 100; upd(0, g); end
    `TB_FINISH
  end
endmodule
