// Shared constants and types of the IEEE 802.15.4 868/915 MHz BPSK modem.
// The PN chip pattern (symbol-to-chip mapping) and the raised-cosine pulse
// p(t) = sinc(t/Tc) * cos(pi t/Tc) / (1 - 4 t^2/Tc^2), roll-off 1, come from
// the modem description. Preamble/SFD values, the register map and all widths
// are choices of this design (preamble and SFD follow IEEE 802.15.4).
package lrwpan_pkg;

  // Chips C0..C14 sent for data bit 0; bit 1 sends the complement.
  // Index 0 is C0, the first chip on air.
  localparam logic [0:14] PN_BIT0 = 15'b111101011001000;
  localparam int unsigned CHIPS_PER_SYM = 15;
  localparam int unsigned OSR           = 10;   // samples per chip
  localparam int unsigned PREAMBLE_BYTES = 4;   // 32 zero bits
  localparam logic [7:0]  SFD           = 8'hA7;
  localparam int unsigned MAX_PSDU      = 127;

  // Raised-cosine taps h[n] = round(240 * p((n-30)/10 * Tc)), n = 0..60.
  // The filter is symmetric; this returns h for |n-30| = d.
  function automatic logic signed [8:0] rc_tap(input int unsigned d);
    case (d)
      0: return 9'sd240;  1: return 9'sd234;  2: return 9'sd216;  3: return 9'sd189;
      4: return 9'sd156;  5: return 9'sd120;  6: return 9'sd85;   7: return 9'sd54;
      8: return 9'sd29;   9: return 9'sd11;  10: return 9'sd0;   11: return -9'sd5;
      12: return -9'sd6; 13: return -9'sd5;  14: return -9'sd2;  15: return 9'sd0;
      16: return 9'sd2;  17: return 9'sd2;   18: return 9'sd2;   19: return 9'sd1;
      20: return 9'sd0;  21: return -9'sd1;  22: return -9'sd1;  23: return -9'sd1;
      default: return 9'sd0;
    endcase
  endfunction

  // sin(2*pi*k/64) * 127 for k = 0..63, built from a quarter wave.
  function automatic logic signed [7:0] sin64(input logic [5:0] k);
    logic signed [7:0] v;
    logic [4:0] idx;
    idx = k[4] ? 5'(16 - k[3:0]) : {1'b0, k[3:0]};
    case (idx)
      5'd0: v = 8'sd0;    5'd1: v = 8'sd12;   5'd2: v = 8'sd25;   5'd3: v = 8'sd37;
      5'd4: v = 8'sd49;   5'd5: v = 8'sd60;   5'd6: v = 8'sd71;   5'd7: v = 8'sd81;
      5'd8: v = 8'sd90;   5'd9: v = 8'sd98;   5'd10: v = 8'sd106; 5'd11: v = 8'sd112;
      5'd12: v = 8'sd117; 5'd13: v = 8'sd122; 5'd14: v = 8'sd125; 5'd15: v = 8'sd126;
      default: v = 8'sd127;
    endcase
    return k[5] ? -v : v;
  endfunction

  // Register map seen by the MCU (7-bit addresses).
  typedef enum logic [6:0] {
    REG_CTRL     = 7'h00,  // [0] rx_en [1] band_915 [2] hdr_filter_en [3] agc_en
    REG_CMD      = 7'h01,  // write: [0] tx_start [1] tx_ack [2] rx_fifo_flush [3] tx_fifo_flush [4] ack_clear [5] clear rx_done
    REG_STATUS   = 7'h02,  // [0] tx_busy [1] rx_done [2] crc_ok [3] hdr_match [4] rx_empty [5] tx_full [6] rf_spi_busy [7] rx_busy
    REG_TXFIFO   = 7'h03,  // write pushes into the Tx FIFO
    REG_RXFIFO   = 7'h04,  // read pops the Rx FIFO
    REG_ACKBUF   = 7'h05,  // write appends to the Tx ACK buffer
    REG_PAN_L    = 7'h06,
    REG_PAN_H    = 7'h07,
    REG_SADDR_L  = 7'h08,
    REG_SADDR_H  = 7'h09,
    REG_RSSI     = 7'h0A,  // read: last RSSI
    REG_GAIN     = 7'h0B,  // read: PGA gain (dB); write: manual gain
    REG_RFSPI_A  = 7'h0C,  // RF transceiver register address
    REG_RFSPI_D  = 7'h0D,  // write: data, starts the RF SPI transfer
    REG_RXCOUNT  = 7'h0E   // read: bytes in the Rx FIFO
  } reg_addr_e;

  typedef struct packed {
    logic rx_en;
    logic band_915;
    logic hdr_filter_en;
    logic agc_en;
  } modem_cfg_t;

endpackage
