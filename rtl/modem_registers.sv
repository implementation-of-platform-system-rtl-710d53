// Definition registers of the modem. Decodes the MCU interface's accesses
// (see lrwpan_pkg::reg_addr_e for the map): configuration (receiver enable,
// band, header filter and AGC enables), commands (send the Tx FIFO or the
// ACK buffer, flush FIFOs, clear the ACK buffer, clear the receive flag), the
// FIFO and ACK-buffer data ports, the node's PAN ID and short address, the
// manual PGA gain and the RF SPI words. Status inputs are read back through
// REG_STATUS. A received packet raises rx_done (and irq) only if it passed the
// header filter or filtering is off; a rejected packet is flushed from the Rx
// FIFO. Reads are combinational on addr; writes and side effects take place
// on the strobe's clock. The map itself is this design's choice: the modem
// description only names the definition registers.
module modem_registers
  import lrwpan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // MCU interface
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic [6:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // configuration and commands
  output modem_cfg_t  cfg,
  output logic        tx_start,
  output logic        tx_use_ack,
  output logic        tx_fifo_flush,
  output logic        rx_fifo_flush,
  output logic        ack_clr,
  output logic        txfifo_wr,
  output logic        ackbuf_wr,
  output logic [7:0]  wr_byte,
  output logic        rxfifo_rd,
  output logic [15:0] pan_id,
  output logic [15:0] short_addr,
  output logic [6:0]  manual_gain,
  output logic        rf_spi_start,
  output logic [7:0]  rf_spi_addr,
  output logic [7:0]  rf_spi_data,
  output logic        irq,
  // status
  input  logic        tx_busy,
  input  logic        rx_busy,
  input  logic        rx_pkt_done,
  input  logic        rx_crc_ok,
  input  logic        rx_hdr_match,
  input  logic [7:0]  rxfifo_rdata,
  input  logic        rx_empty,
  input  logic        tx_full,
  input  logic [7:0]  rx_count,
  input  logic [7:0]  rssi,
  input  logic [6:0]  gain,
  input  logic        rf_spi_busy
);
  logic rx_done, crc_ok_q, match_q, rx_reject;

  assign rx_reject = rx_pkt_done && cfg.hdr_filter_en && !rx_hdr_match;
  assign irq       = rx_done;

  always_comb begin
    tx_start      = wr_en && addr == REG_CMD && wdata[0];
    tx_use_ack    = wr_en && addr == REG_CMD && wdata[1];
    rx_fifo_flush = (wr_en && addr == REG_CMD && wdata[2]) || rx_reject;
    tx_fifo_flush = wr_en && addr == REG_CMD && wdata[3];
    ack_clr       = wr_en && addr == REG_CMD && wdata[4];
    txfifo_wr     = wr_en && addr == REG_TXFIFO;
    ackbuf_wr     = wr_en && addr == REG_ACKBUF;
    wr_byte       = wdata;
    rxfifo_rd     = rd_en && addr == REG_RXFIFO;
    rf_spi_start  = wr_en && addr == REG_RFSPI_D;
    rf_spi_data   = wdata;
  end

  always_comb begin
    case (addr)
      REG_CTRL:    rdata = {4'b0, cfg.agc_en, cfg.hdr_filter_en, cfg.band_915, cfg.rx_en};
      REG_STATUS:  rdata = {rx_busy, rf_spi_busy, tx_full, rx_empty, match_q, crc_ok_q, rx_done, tx_busy};
      REG_RXFIFO:  rdata = rxfifo_rdata;
      REG_PAN_L:   rdata = pan_id[7:0];
      REG_PAN_H:   rdata = pan_id[15:8];
      REG_SADDR_L: rdata = short_addr[7:0];
      REG_SADDR_H: rdata = short_addr[15:8];
      REG_RSSI:    rdata = rssi;
      REG_GAIN:    rdata = {1'b0, gain};
      REG_RFSPI_A: rdata = rf_spi_addr;
      REG_RXCOUNT: rdata = rx_count;
      default:     rdata = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '{rx_en: 1'b0, band_915: 1'b0, hdr_filter_en: 1'b0, agc_en: 1'b1};
      pan_id <= 16'hFFFF; short_addr <= 16'hFFFF; manual_gain <= 7'd50; rf_spi_addr <= '0;
      rx_done <= 1'b0; crc_ok_q <= 1'b0; match_q <= 1'b0;
    end else begin
      if (wr_en) begin
        case (addr)
          REG_CTRL:    cfg <= '{rx_en: wdata[0], band_915: wdata[1], hdr_filter_en: wdata[2], agc_en: wdata[3]};
          REG_PAN_L:   pan_id[7:0] <= wdata;
          REG_PAN_H:   pan_id[15:8] <= wdata;
          REG_SADDR_L: short_addr[7:0] <= wdata;
          REG_SADDR_H: short_addr[15:8] <= wdata;
          REG_GAIN:    manual_gain <= wdata[6:0];
          REG_RFSPI_A: rf_spi_addr <= wdata;
          REG_CMD:     if (wdata[5]) rx_done <= 1'b0;
          default: ;
        endcase
      end
      if (rx_pkt_done && !rx_reject) begin
        rx_done  <= 1'b1;
        crc_ok_q <= rx_crc_ok;
        match_q  <= rx_hdr_match;
      end
    end
  end
endmodule
