// MCU interface: a 4-wire SPI slave (SPI mode 0, MSB first) through which the
// 8051 reaches the modem registers. The system clock oversamples SCLK, CS_N
// and MOSI through two-stage synchronisers, so SCLK must stay at least four
// clocks high and four low. A transfer, framed by CS_N low, is a command
// octet {W, A[6:0]} (W = 1 write, 0 read) followed by one or more data
// octets, each repeating the access at address A (bursts into or out of a
// FIFO port). For a write, wr_en pulses with wdata after each data octet.
// For a read, rdata is sampled two clocks after the command octet and shifted
// out in the next octet; rd_en pulses after each data octet has been sent
// (popping a FIFO port), and rdata is sampled again one clock later for the
// following octet. The SPI link is from the modem block diagram; the
// framing is this design's choice.
module mcu_spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  output logic       wr_en,
  output logic       rd_en,
  output logic [6:0] addr,
  output logic [7:0] wdata,
  input  logic [7:0] rdata
);
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic       rise, fall, sel;
  logic [7:0] rx_sh, tx_sh, tx_hold;
  logic [2:0] bitn;
  logic       have_cmd, is_wr, load_tx, cap1, cap2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end
  assign sel  = !cs_s[1];
  assign rise = sel && sclk_s[1] && !sclk_s[2];
  assign fall = sel && !sclk_s[1] && sclk_s[2];
  assign miso = tx_sh[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sh <= '0; tx_sh <= '0; tx_hold <= '0; bitn <= '0; have_cmd <= 1'b0;
      is_wr <= 1'b0; addr <= '0; wdata <= '0; wr_en <= 1'b0; rd_en <= 1'b0; load_tx <= 1'b0;
      cap1 <= 1'b0; cap2 <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      rd_en <= 1'b0;
      cap1  <= 1'b0;
      cap2  <= cap1;
      if (cap2) tx_hold <= rdata;
      if (!sel) begin
        bitn     <= '0;
        have_cmd <= 1'b0;
        load_tx  <= 1'b0;
        tx_sh    <= '0;
      end else begin
        if (rise) begin
          rx_sh <= {rx_sh[6:0], mosi_s[1]};
          bitn  <= bitn + 1'b1;
          if (bitn == 3'd7) begin
            if (!have_cmd) begin
              have_cmd <= 1'b1;
              is_wr    <= rx_sh[6];
              addr     <= {rx_sh[5:0], mosi_s[1]};
              cap1     <= !rx_sh[6];
              load_tx  <= !rx_sh[6];
            end else if (is_wr) begin
              wr_en <= 1'b1;
              wdata <= {rx_sh[6:0], mosi_s[1]};
            end else begin
              rd_en   <= 1'b1;
              cap1    <= 1'b1;
              load_tx <= 1'b1;
            end
          end
        end
        if (fall) begin
          if (load_tx && bitn == 3'd0) begin
            tx_sh   <= tx_hold;
            load_tx <= 1'b0;
          end else begin
            tx_sh <= {tx_sh[6:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
