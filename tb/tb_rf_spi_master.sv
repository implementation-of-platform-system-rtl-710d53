// Testbench of rf_spi_master: a slave model samples MOSI on SCLK rising edges
// while CS_N is low; each transfer must deliver {addr, data} MSB first in
// exactly 16 SCLK cycles of 2*DIV system clocks, with busy held meanwhile.
`include "tb/tb_util.svh"
module tb_rf_spi_master;
  logic clk = 0, rst_n = 1, start = 0;
  logic [7:0] addr = 0, data = 0;
  logic busy, sclk, cs_n, mosi;
  int checks = 0, failures = 0;
  logic [15:0] rx_sh;
  int nclk, ncyc;
  logic sclk_d;
  always #5 clk = ~clk;
  rf_spi_master #(.DIV(6)) dut (.*);
  `TB_WATCHDOG(50000)
  always @(posedge clk) begin
    sclk_d <= sclk;
    if (!cs_n) ncyc++;
    if (!cs_n && sclk && !sclk_d) begin rx_sh <= {rx_sh[14:0], mosi}; nclk++; end
  end
  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      nclk = 0; ncyc = 0;
      @(negedge clk);
      addr = 8'($urandom); data = 8'($urandom); start = 1;
      @(negedge clk) start = 0;
      `TB_CHECK(busy && !cs_n, "busy and selected")
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      `TB_CHECK(cs_n, "deselected")
      `TB_CHECK(nclk == 16, $sformatf("%0d SCLK pulses", nclk))
      `TB_CHECK(rx_sh == {addr, data}, $sformatf("frame %04x exp %02x%02x", rx_sh, addr, data))
      `TB_CHECK(ncyc >= 16 * 12 && ncyc <= 16 * 12 + 12, $sformatf("frame length %0d clocks", ncyc))
    end
    `TB_FINISH
  end
endmodule
