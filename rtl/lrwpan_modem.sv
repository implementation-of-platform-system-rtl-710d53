// IEEE 802.15.4 868/915 MHz BPSK modem (the digital part between an 8051 MAC
// controller and a direct-conversion RF transceiver).
//
// Transmit: the MCU writes a packet (length octet, then payload) into the Tx
// FIFO, or an acknowledgement into the Tx ACK buffer, and issues a command.
// The framer sends preamble, SFD, length, payload and a computed FCS bit by
// bit; each bit is differentially encoded (E_n = R_n xor E_(n-1)), spread to
// 15 PN chips and pulse shaped by a raised-cosine filter at 10 samples per
// chip into the 6-bit DAC code tx_dac. tx_on is high while a packet is on air.
//
// Receive: the 4-bit I/Q ADC samples pass DC offset removal; RSSI (average
// power over a symbol) drives the AGC that sets the 7-bit PGA gain word in dB.
// A Costas loop removes the carrier offset on every sample, chip timing
// recovery then picks one sample per chip, the symbol correlator finds the
// symbol boundary and decides bits, the differential decoder undoes the encoding, and the deframer finds
// the SFD, stores length and PSDU in the Rx FIFO, checks the FCS and feeds the
// header filter. The receiver is idle while transmitting (half duplex).
//
// Control: a 4-wire SPI slave gives the MCU access to the definition
// registers (map in lrwpan_pkg); an SPI master writes control words into the
// RF IC. All logic runs on clk (12 MHz by default: 4 clocks per sample at
// 868 MHz, 2 at 915 MHz) with an active-low asynchronous reset.
// The chain of blocks follows the modem block diagram; clock, widths of the
// internal signals, register map and the handshakes are this design's own.
module lrwpan_modem
  import lrwpan_pkg::*;
#(
  parameter int unsigned CLK_HZ = 12_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  // 8051 MCU (4-wire SPI)
  input  logic              mcu_sclk,
  input  logic              mcu_cs_n,
  input  logic              mcu_mosi,
  output logic              mcu_miso,
  output logic              irq,
  // RF transceiver
  input  logic signed [3:0] rx_i,
  input  logic signed [3:0] rx_q,
  output logic signed [5:0] tx_dac,
  output logic              tx_on,
  output logic [6:0]        pga_gain,
  output logic              rf_sclk,
  output logic              rf_cs_n,
  output logic              rf_mosi
);
  // ---------------- control ----------------
  logic       wr_en, rd_en;
  logic [6:0] addr;
  logic [7:0] wdata, rdata;
  modem_cfg_t cfg;
  logic tx_start, tx_use_ack, tx_fifo_flush, rx_fifo_flush, ack_clr;
  logic txfifo_wr, ackbuf_wr, rxfifo_rd, rf_spi_start, rf_spi_busy;
  logic [7:0]  wr_byte, rf_spi_addr, rf_spi_data;
  logic [15:0] pan_id, short_addr;
  logic [6:0]  manual_gain, agc_gain;
  logic sample_tick, chip_tick;

  mcu_spi_slave u_mcu_if (
    .clk, .rst_n, .sclk(mcu_sclk), .cs_n(mcu_cs_n), .mosi(mcu_mosi), .miso(mcu_miso),
    .wr_en, .rd_en, .addr, .wdata, .rdata
  );

  timing_control #(.CLK_HZ(CLK_HZ)) u_timing (
    .clk, .rst_n, .band_915(cfg.band_915), .sample_tick, .chip_tick
  );

  rf_spi_master u_rf_spi (
    .clk, .rst_n, .start(rf_spi_start), .addr(rf_spi_addr), .data(rf_spi_data),
    .busy(rf_spi_busy), .sclk(rf_sclk), .cs_n(rf_cs_n), .mosi(rf_mosi)
  );

  // ---------------- transmitter ----------------
  logic [7:0] txf_rdata, ack_rdata;
  logic       txf_full, txf_empty, fr_fifo_rd, fr_ack_rd, fr_ack_rewind;
  logic       fr_bit, fr_busy, fr_done, fr_start, sp_bit_rd, enc_bit;
  logic       chip, chip_vld, psf_active;
  logic [7:0] txf_count;

  assign fr_start = (tx_start || tx_use_ack) && !tx_on;

  sync_fifo #(.DEPTH(128), .WIDTH(8)) u_tx_fifo (
    .clk, .rst_n, .flush(tx_fifo_flush), .wr_en(txfifo_wr), .wdata(wr_byte),
    .rd_en(fr_fifo_rd), .rdata(txf_rdata), .empty(txf_empty), .full(txf_full), .count(txf_count)
  );

  ack_buffer #(.DEPTH(8)) u_ack_buf (
    .clk, .rst_n, .clr(ack_clr), .wr_en(ackbuf_wr), .wdata(wr_byte),
    .rd_rewind(fr_ack_rewind), .rd_en(fr_ack_rd), .rdata(ack_rdata), .fill()
  );

  tx_framer u_framer (
    .clk, .rst_n, .start(fr_start), .use_ack(tx_use_ack),
    .fifo_rdata(txf_rdata), .fifo_rd(fr_fifo_rd),
    .ack_rdata(ack_rdata), .ack_rd(fr_ack_rd), .ack_rewind(fr_ack_rewind),
    .bit_rd(sp_bit_rd), .bit_o(fr_bit), .bit_valid(), .busy(fr_busy), .done(fr_done)
  );

  diff_encoder u_diff_enc (
    .clk, .rst_n, .clear(fr_start), .en(sp_bit_rd), .r(fr_bit), .e(enc_bit)
  );

  chip_spreader u_spreader (
    .clk, .rst_n, .chip_tick, .run(fr_busy), .bit_i(enc_bit), .bit_rd(sp_bit_rd),
    .chip, .chip_valid(chip_vld)
  );

  pulse_shaping_filter #(.DAC_W(6)) u_psf (
    .clk, .rst_n, .sample_tick, .chip_tick, .chip, .chip_valid(chip_vld),
    .dac(tx_dac), .active(psf_active)
  );

  assign tx_on = fr_busy || chip_vld || psf_active;

  // ---------------- receiver ----------------
  logic rx_run, s_en;
  logic signed [5:0] dc_i, dc_q;
  logic signed [7:0] ct_i, ct_q;
  logic signed [7:0] cc_i, cc_q;
  logic signed [15:0] cc_freq;
  logic [7:0] rssi;
  logic rssi_valid, ct_valid, cc_valid;
  logic sc_bit_valid, sc_bit, sc_locked, sc_locked_d, dd_bit, dd_valid;
  logic df_fifo_wr, df_hdr_valid, df_busy, df_done, df_crc_ok, df_abort;
  logic [7:0] df_wdata, df_hdr_byte, rxf_rdata, rxf_count;
  logic [6:0] df_hdr_idx;
  logic rxf_empty, rxf_full, hf_match;
  logic [3:0] ct_phase, sc_match;
  logic ct_settled;

  assign rx_run = cfg.rx_en && !tx_on;
  assign s_en   = sample_tick && rx_run;

  dc_offset_comp #(.ADC_W(4), .OUT_W(6)) u_dc (
    .clk, .rst_n, .en(s_en), .in_i(rx_i), .in_q(rx_q), .out_i(dc_i), .out_q(dc_q)
  );

  rssi_estimator #(.IN_W(6)) u_rssi (
    .clk, .rst_n, .en(s_en), .in_i(dc_i), .in_q(dc_q), .rssi, .valid(rssi_valid)
  );

  agc_control u_agc (
    .clk, .rst_n, .rssi, .rssi_valid(rssi_valid && cfg.agc_en), .freeze(df_busy),
    .gain(agc_gain), .step_up(), .step_down()
  );
  assign pga_gain = cfg.agc_en ? agc_gain : manual_gain;

  carrier_offset_comp #(.IN_W(6)) u_costas (
    .clk, .rst_n, .clear(!rx_run), .en(s_en), .in_i(dc_i), .in_q(dc_q),
    .out_valid(cc_valid), .out_i(cc_i), .out_q(cc_q), .freq(cc_freq)
  );

  chip_timing_recovery #(.IN_W(8)) u_chip_timing (
    .clk, .rst_n, .en(cc_valid), .in_i(cc_i), .in_q(cc_q),
    .chip_valid(ct_valid), .chip_i(ct_i), .chip_q(ct_q), .phase(ct_phase), .settled(ct_settled)
  );

  symbol_correlator u_corr (
    .clk, .rst_n, .clear(df_abort || df_done || !rx_run), .acq_en(ct_settled), .chip_valid(ct_valid), .chip_i(ct_i),
    .bit_valid(sc_bit_valid), .bit_o(sc_bit), .locked(sc_locked), .match(sc_match)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sc_locked_d <= 1'b0;
    else sc_locked_d <= sc_locked;
  end

  diff_decoder u_diff_dec (
    .clk, .rst_n, .clear(!sc_locked), .en(sc_bit_valid), .e(sc_bit), .r(dd_bit), .r_valid(dd_valid)
  );

  rx_deframer u_deframer (
    .clk, .rst_n, .start(sc_locked && !sc_locked_d), .bit_valid(dd_valid), .bit_i(dd_bit),
    .fifo_wr(df_fifo_wr), .fifo_wdata(df_wdata),
    .hdr_valid(df_hdr_valid), .hdr_idx(df_hdr_idx), .hdr_byte(df_hdr_byte),
    .busy(df_busy), .done(df_done), .crc_ok(df_crc_ok), .hunt_abort(df_abort)
  );

  sync_fifo #(.DEPTH(128), .WIDTH(8)) u_rx_fifo (
    .clk, .rst_n, .flush(rx_fifo_flush), .wr_en(df_fifo_wr), .wdata(df_wdata),
    .rd_en(rxfifo_rd), .rdata(rxf_rdata), .empty(rxf_empty), .full(rxf_full), .count(rxf_count)
  );

  header_filter u_hdr_filter (
    .clk, .rst_n, .hdr_valid(df_hdr_valid), .hdr_idx(df_hdr_idx), .hdr_byte(df_hdr_byte),
    .pan_id, .short_addr, .match(hf_match)
  );

  modem_registers u_regs (
    .clk, .rst_n, .wr_en, .rd_en, .addr, .wdata, .rdata, .cfg,
    .tx_start, .tx_use_ack, .tx_fifo_flush, .rx_fifo_flush, .ack_clr,
    .txfifo_wr, .ackbuf_wr, .wr_byte, .rxfifo_rd, .pan_id, .short_addr, .manual_gain,
    .rf_spi_start, .rf_spi_addr, .rf_spi_data, .irq,
    .tx_busy(tx_on), .rx_busy(df_busy), .rx_pkt_done(df_done), .rx_crc_ok(df_crc_ok),
    .rx_hdr_match(hf_match), .rxfifo_rdata(rxf_rdata), .rx_empty(rxf_empty), .tx_full(txf_full),
    .rx_count(rxf_count), .rssi, .gain(pga_gain), .rf_spi_busy
  );
endmodule
