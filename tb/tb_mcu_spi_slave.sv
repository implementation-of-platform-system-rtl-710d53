// Testbench of mcu_spi_slave: an SPI mode-0 master model (SCLK half period 5
// system clocks) writes single registers and bursts, and reads a register and
// a FIFO-like port whose value advances with every rd_en. Checks the strobes,
// address, write data and the octets returned on MISO.
`include "tb/tb_util.svh"
module tb_mcu_spi_slave;
  logic clk = 0, rst_n = 1, sclk = 0, cs_n = 1, mosi = 0;
  logic miso, wr_en, rd_en;
  logic [6:0] addr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;
  byte unsigned wr_log[$];
  logic [6:0] wr_addr_log[$];
  int n_rd;
  logic [7:0] fifo_val;
  always #5 clk = ~clk;
  mcu_spi_slave dut (.*);
  `TB_WATCHDOG(100000)

  // register model: address 5 is a counter port popped by rd_en, others
  // return {1'b0, addr}
  assign rdata = (addr == 7'd5) ? fifo_val : {1'b0, addr};
  always @(posedge clk) begin
    if (wr_en) begin wr_log.push_back(wdata); wr_addr_log.push_back(addr); end
    if (rd_en) begin n_rd++; if (addr == 7'd5) fifo_val <= fifo_val + 8'd3; end
  end

  task automatic xfer(input byte unsigned tx, output byte unsigned rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      repeat (5) @(negedge clk);
      sclk = 1;
      rx[b] = miso;
      repeat (5) @(negedge clk);
      sclk = 0;
    end
  endtask

  initial begin
    byte unsigned r;
    n_rd = 0; fifo_val = 8'h10;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single write
    cs_n = 0; repeat (5) @(negedge clk);
    xfer(8'h80 | 8'h06, r); xfer(8'hC3, r);
    repeat (5) @(negedge clk); cs_n = 1; repeat (10) @(negedge clk);
    `TB_CHECK(wr_log.size() == 1 && wr_log[0] == 8'hC3 && wr_addr_log[0] == 7'h06, "single write")
    // burst write of 4 octets to address 3
    cs_n = 0; repeat (5) @(negedge clk);
    xfer(8'h83, r);
    for (int i = 0; i < 4; i++) xfer(8'(8'h40 + i), r);
    repeat (5) @(negedge clk); cs_n = 1; repeat (10) @(negedge clk);
    `TB_CHECK(wr_log.size() == 5, "burst write count")
    for (int i = 0; i < 4; i++) `TB_CHECK(wr_log[i + 1] == 8'h40 + i && wr_addr_log[i + 1] == 7'h03, "burst data")
    // single read of address 0x2A
    cs_n = 0; repeat (5) @(negedge clk);
    xfer(8'h2A, r); xfer(8'h00, r);
    repeat (5) @(negedge clk); cs_n = 1; repeat (10) @(negedge clk);
    `TB_CHECK(r == 8'h2A, $sformatf("read returns %02x", r))
    `TB_CHECK(n_rd == 1, "one read strobe")
    // burst read of 3 octets from the port at 5
    cs_n = 0; repeat (5) @(negedge clk);
    xfer(8'h05, r);
    for (int i = 0; i < 3; i++) begin
      xfer(8'h00, r);
      `TB_CHECK(r == 8'h10 + 3 * i, $sformatf("burst read %0d: %02x", i, r))
    end
    repeat (5) @(negedge clk); cs_n = 1; repeat (10) @(negedge clk);
    `TB_CHECK(n_rd == 4, "read strobes in burst")
    `TB_CHECK(wr_log.size() == 5, "no writes during reads")
    `TB_FINISH
  end
endmodule
