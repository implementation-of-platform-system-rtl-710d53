// Testbench of modem_registers: writes and reads back the configuration and
// address registers, checks command strobes, FIFO port strobes, the RF SPI
// start, the status word, and that rx_done/irq are set for an accepted frame,
// not for a filtered one (which flushes the Rx FIFO instead), and cleared by
// command.
`include "tb/tb_util.svh"
module tb_modem_registers;
  import lrwpan_pkg::*;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0, rd_en = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  modem_cfg_t cfg;
  logic tx_start, tx_use_ack, tx_fifo_flush, rx_fifo_flush, ack_clr, txfifo_wr, ackbuf_wr, rxfifo_rd;
  logic [7:0] wr_byte, rf_spi_addr, rf_spi_data;
  logic [15:0] pan_id, short_addr;
  logic [6:0] manual_gain;
  logic rf_spi_start, irq;
  logic tx_busy = 0, rx_busy = 0, rx_pkt_done = 0, rx_crc_ok = 0, rx_hdr_match = 0;
  logic [7:0] rxfifo_rdata = 8'h5C, rx_count = 8'd9, rssi = 8'd33;
  logic rx_empty = 0, tx_full = 0, rf_spi_busy = 0;
  logic [6:0] gain = 7'd77;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  modem_registers dut (.*);
  `TB_WATCHDOG(10000)

  task automatic wr(input reg_addr_e a, input logic [7:0] d);
    @(negedge clk) begin wr_en = 1; addr = a; wdata = d; end
    #1;
  endtask
  task automatic idle();
    @(negedge clk) begin wr_en = 0; rd_en = 0; end
  endtask
  task automatic rd(input reg_addr_e a, output logic [7:0] d);
    @(negedge clk) begin rd_en = 1; addr = a; end
    #1 d = rdata;
  endtask

  initial begin
    logic [7:0] d;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(REG_CTRL, 8'h0F); idle();
    `TB_CHECK(cfg.rx_en && cfg.band_915 && cfg.hdr_filter_en && cfg.agc_en, "ctrl fields")
    wr(REG_PAN_L, 8'h34); wr(REG_PAN_H, 8'h12); wr(REG_SADDR_L, 8'h42); wr(REG_SADDR_H, 8'h00); idle();
    `TB_CHECK(pan_id == 16'h1234 && short_addr == 16'h0042, "addresses")
    rd(REG_PAN_H, d); `TB_CHECK(d == 8'h12, "read PAN high")
    rd(REG_CTRL, d); `TB_CHECK(d == 8'h0F, "read ctrl")
    rd(REG_RSSI, d); `TB_CHECK(d == 8'd33, "read rssi")
    rd(REG_GAIN, d); `TB_CHECK(d == 8'd77, "read gain")
    rd(REG_RXCOUNT, d); `TB_CHECK(d == 8'd9, "read rx count")
    rd(REG_RXFIFO, d); `TB_CHECK(d == 8'h5C && rxfifo_rd, "rx fifo pop")
    idle();
    wr(REG_CMD, 8'h01); `TB_CHECK(tx_start && !tx_use_ack, "tx start"); idle();
    wr(REG_CMD, 8'h02); `TB_CHECK(tx_use_ack && !tx_start, "tx ack"); idle();
    wr(REG_CMD, 8'h1C); `TB_CHECK(rx_fifo_flush && tx_fifo_flush && ack_clr, "flush and clear"); idle();
    wr(REG_TXFIFO, 8'hAB); `TB_CHECK(txfifo_wr && wr_byte == 8'hAB && !ackbuf_wr, "tx fifo push"); idle();
    wr(REG_ACKBUF, 8'hCD); `TB_CHECK(ackbuf_wr && !txfifo_wr, "ack buffer push"); idle();
    wr(REG_RFSPI_A, 8'h21); wr(REG_RFSPI_D, 8'h99);
    `TB_CHECK(rf_spi_start && rf_spi_addr == 8'h21 && rf_spi_data == 8'h99, "rf spi start"); idle();
    wr(REG_GAIN, 8'd40); idle(); `TB_CHECK(manual_gain == 7'd40, "manual gain")
    // filtered frame
    @(negedge clk) begin rx_pkt_done = 1; rx_crc_ok = 1; rx_hdr_match = 0; end
    #1 `TB_CHECK(rx_fifo_flush, "rejected frame flushed")
    @(negedge clk) rx_pkt_done = 0;
    `TB_CHECK(!irq, "no irq for rejected frame")
    // accepted frame
    @(negedge clk) begin rx_pkt_done = 1; rx_hdr_match = 1; end
    #1 `TB_CHECK(!rx_fifo_flush, "accepted frame kept")
    @(negedge clk) rx_pkt_done = 0;
    `TB_CHECK(irq, "irq for accepted frame")
    rd(REG_STATUS, d); `TB_CHECK(d[1] && d[2] && d[3], "status rx_done crc_ok match")
    idle();
    wr(REG_CMD, 8'h20); idle();
    `TB_CHECK(!irq, "rx_done cleared")
    `TB_FINISH
  end
endmodule
