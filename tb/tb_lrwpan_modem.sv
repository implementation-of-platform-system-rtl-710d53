// End-to-end testbench of lrwpan_modem at its default parameters (12 MHz
// clock). Two modems, node A and node B, are connected through a behavioural
// radio channel: each node's 6-bit DAC output is rotated by a carrier that
// advances F_OFF turns per clock (a carrier frequency offset), scaled by a
// gain that follows the receiving node's PGA word (1 dB per step), offset by
// a DC term and quantised to the 4-bit ADC range. Each node's MCU is modelled
// by an SPI master task.
// Scenario: RF SPI write; A sends a data frame to B (868 MHz band); B answers
// from its ACK buffer; A sends a frame to another address (filtered by B);
// A sends a frame that the channel corrupts (FCS error at B); both switch to
// the 915 MHz band and A sends again. Every accepted frame is read out of the
// receiver's FIFO over SPI and compared with what was sent. Each mechanism
// (AGC step, carrier offset tracking, header filter reject, CRC error, ACK
// transmission, both bands, RF SPI) is counted and must occur.
`include "tb/tb_util.svh"
module tb_lrwpan_modem;
  import lrwpan_pkg::*;
  logic clk = 0, rst_n = 1;
  logic sclk [2], cs_n [2], mosi [2], miso [2], irq [2];
  logic signed [3:0] rx_i [2], rx_q [2];
  logic signed [5:0] tx_dac [2];
  logic tx_on [2];
  logic [6:0] pga [2];
  logic rf_sclk [2], rf_cs_n [2], rf_mosi [2];
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real F_OFF = 0.0029;   // carrier offset, turns per clock (34.8 kHz, 40 ppm at 868 MHz)
  always #5 clk = ~clk;

  lrwpan_modem dut_a (
    .clk, .rst_n, .mcu_sclk(sclk[0]), .mcu_cs_n(cs_n[0]), .mcu_mosi(mosi[0]), .mcu_miso(miso[0]),
    .irq(irq[0]), .rx_i(rx_i[0]), .rx_q(rx_q[0]), .tx_dac(tx_dac[0]), .tx_on(tx_on[0]),
    .pga_gain(pga[0]), .rf_sclk(rf_sclk[0]), .rf_cs_n(rf_cs_n[0]), .rf_mosi(rf_mosi[0])
  );
  lrwpan_modem dut_b (
    .clk, .rst_n, .mcu_sclk(sclk[1]), .mcu_cs_n(cs_n[1]), .mcu_mosi(mosi[1]), .mcu_miso(miso[1]),
    .irq(irq[1]), .rx_i(rx_i[1]), .rx_q(rx_q[1]), .tx_dac(tx_dac[1]), .tx_on(tx_on[1]),
    .pga_gain(pga[1]), .rf_sclk(rf_sclk[1]), .rf_cs_n(rf_cs_n[1]), .rf_mosi(rf_mosi[1])
  );

  `TB_WATCHDOG(3_000_000)

  // ---------------- channel ----------------
  real ph;
  bit corrupt;
  int n_agc_steps, n_rf_frames, n_a_done, n_b_done;
  logic [6:0] pga_b_d;
  logic [15:0] rf_sh;
  logic rf_sclk_d;
  int rf_bits;

  function automatic logic signed [3:0] adc(real v);
    int k;
    k = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
    if (k > 7) k = 7;
    if (k < -8) k = -8;
    return 4'(k);
  endfunction

  always @(posedge clk) begin
    real g, s;
    ph <= ph + F_OFF;
    for (int n = 0; n < 2; n++) begin
      s = tx_on[1 - n] ? real'(tx_dac[1 - n]) : 0.0;
      if (corrupt && n == 1) s = -s;
      g = (10.0 / 30.0) * $pow(10.0, (real'(pga[n]) - 100.0) / 20.0);
      rx_i[n] <= adc(s * g * $cos(2 * PI * ph) + 1.0);
      rx_q[n] <= adc(s * g * $sin(2 * PI * ph) - 1.0);
    end
    pga_b_d <= pga[1];
    if (rst_n && pga[1] != pga_b_d) n_agc_steps++;
    if (dut_a.u_deframer.done) n_a_done++;
    if (dut_b.u_deframer.done) n_b_done++;
    rf_sclk_d <= rf_sclk[0];
    if (!rf_cs_n[0] && rf_sclk[0] && !rf_sclk_d) begin rf_sh <= {rf_sh[14:0], rf_mosi[0]}; rf_bits++; end
  end

  // ---------------- MCU model ----------------
  task automatic spi_byte(input int n, input byte unsigned tx, output byte unsigned rx);
    for (int b = 7; b >= 0; b--) begin
      mosi[n] = tx[b];
      repeat (5) @(negedge clk);
      sclk[n] = 1;
      rx[b] = miso[n];
      repeat (5) @(negedge clk);
      sclk[n] = 0;
    end
  endtask
  task automatic reg_wr(input int n, input reg_addr_e a, input byte unsigned d);
    byte unsigned r;
    cs_n[n] = 0; repeat (5) @(negedge clk);
    spi_byte(n, 8'h80 | 8'(a), r);
    spi_byte(n, d, r);
    repeat (5) @(negedge clk); cs_n[n] = 1; repeat (10) @(negedge clk);
  endtask
  task automatic burst_wr(input int n, input reg_addr_e a, input byte unsigned d[$]);
    byte unsigned r;
    cs_n[n] = 0; repeat (5) @(negedge clk);
    spi_byte(n, 8'h80 | 8'(a), r);
    foreach (d[i]) spi_byte(n, d[i], r);
    repeat (5) @(negedge clk); cs_n[n] = 1; repeat (10) @(negedge clk);
  endtask
  task automatic reg_rd(input int n, input reg_addr_e a, output byte unsigned d);
    byte unsigned r;
    cs_n[n] = 0; repeat (5) @(negedge clk);
    spi_byte(n, 8'(a), r);
    spi_byte(n, 8'h00, d);
    repeat (5) @(negedge clk); cs_n[n] = 1; repeat (10) @(negedge clk);
  endtask
  task automatic burst_rd(input int n, input reg_addr_e a, input int cnt, output byte unsigned d[$]);
    byte unsigned r;
    d.delete();
    cs_n[n] = 0; repeat (5) @(negedge clk);
    spi_byte(n, 8'(a), r);
    for (int i = 0; i < cnt; i++) begin spi_byte(n, 8'h00, r); d.push_back(r); end
    repeat (5) @(negedge clk); cs_n[n] = 1; repeat (10) @(negedge clk);
  endtask

  function automatic logic [15:0] crc_model(byte unsigned m[$]);
    logic [15:0] r;
    r = 0;
    foreach (m[i])
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = m[i][b] ^ r[15];
        r = {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
      end
    return {<<{r}};
  endfunction

  // data frame: FCF 0x8841 (data, PAN ID compression, short addresses),
  // sequence number, destination PAN, destination, source, payload
  function automatic void make_frame(input logic [15:0] dst, input byte unsigned seq, input int plen,
                                     output byte unsigned psdu[$]);
    psdu = '{8'h41, 8'h88, seq, 8'h34, 8'h12, dst[7:0], dst[15:8], 8'h01, 8'h00};
    for (int i = 0; i < plen; i++) psdu.push_back(8'($urandom));
  endfunction

  // send psdu (without FCS) from node `from`; wait until the other node's
  // deframer has finished or gave up
  task automatic send(input int from, input byte unsigned psdu[$], input bit use_ack);
    byte unsigned img[$];
    int done0;
    img = '{8'(psdu.size() + 2)};
    foreach (psdu[i]) img.push_back(psdu[i]);
    done0 = (from == 0) ? n_b_done : n_a_done;
    if (use_ack) begin
      reg_wr(from, REG_CMD, 8'h10);
      burst_wr(from, REG_ACKBUF, img);
      reg_wr(from, REG_CMD, 8'h02);
    end else begin
      burst_wr(from, REG_TXFIFO, img);
      reg_wr(from, REG_CMD, 8'h01);
    end
    @(negedge clk);
    `TB_CHECK(tx_on[from], "transmitter on")
    while (tx_on[from]) @(negedge clk);
    repeat (2000) @(negedge clk);
    `TB_CHECK(((from == 0) ? n_b_done : n_a_done) == done0 + 1, "receiver finished the frame")
  endtask

  // check the frame in node n's Rx FIFO; returns the status word
  task automatic check_rx(input int n, input byte unsigned psdu[$], input bit expect_crc, output byte unsigned st);
    byte unsigned cnt, got[$];
    logic [15:0] f;
    reg_rd(n, REG_STATUS, st);
    reg_rd(n, REG_RXCOUNT, cnt);
    `TB_CHECK(cnt == psdu.size() + 3, $sformatf("rx count %0d exp %0d", cnt, psdu.size() + 3))
    burst_rd(n, REG_RXFIFO, cnt, got);
    `TB_CHECK(got[0] == psdu.size() + 2, "length octet")
    if (expect_crc) begin
      f = crc_model(psdu);
      foreach (psdu[i]) `TB_CHECK(got[i + 1] == psdu[i], $sformatf("octet %0d: %02x exp %02x", i, got[i + 1], psdu[i]))
      `TB_CHECK(got[cnt - 2] == f[7:0] && got[cnt - 1] == f[15:8], "FCS octets")
    end
    reg_wr(n, REG_CMD, 8'h24);   // clear rx_done, flush the rest
  endtask

  int n_data_ok, n_ack_ok, n_reject, n_crc_err, n_band915, n_cfo;
  initial begin
    byte unsigned psdu[$], st, d;
    for (int n = 0; n < 2; n++) begin sclk[n] = 0; cs_n[n] = 1; mosi[n] = 0; end
    ph = 0; corrupt = 0; n_agc_steps = 0; n_rf_frames = 0; n_a_done = 0; n_b_done = 0; rf_bits = 0;
    n_data_ok = 0; n_ack_ok = 0; n_reject = 0; n_crc_err = 0; n_band915 = 0; n_cfo = 0;
    #1 rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);

    // RF transceiver set-up word through the RF SPI
    reg_wr(0, REG_RFSPI_A, 8'h05);
    reg_wr(0, REG_RFSPI_D, 8'h3C);
    repeat (300) @(negedge clk);
    `TB_CHECK(rf_bits == 16 && rf_sh == 16'h053C, $sformatf("RF SPI frame %04x", rf_sh))
    if (rf_bits == 16) n_rf_frames++;

    // node identities; B filters headers
    reg_wr(1, REG_PAN_L, 8'h34); reg_wr(1, REG_PAN_H, 8'h12);
    reg_wr(1, REG_SADDR_L, 8'h42); reg_wr(1, REG_SADDR_H, 8'h00);
    reg_wr(0, REG_PAN_L, 8'h34); reg_wr(0, REG_PAN_H, 8'h12);
    reg_wr(0, REG_SADDR_L, 8'h01); reg_wr(0, REG_SADDR_H, 8'h00);
    reg_wr(0, REG_CTRL, 8'h09);          // rx_en, agc_en, 868 MHz
    reg_wr(1, REG_CTRL, 8'h0D);          // rx_en, filter, agc_en, 868 MHz
    reg_rd(1, REG_CTRL, d);
    `TB_CHECK(d == 8'h0D, "control register read back")

    // 1. data frame A -> B
    make_frame(16'h0042, 8'h11, 12, psdu);
    send(0, psdu, 0);
    `TB_CHECK(irq[1], "B interrupt")
    check_rx(1, psdu, 1, st);
    `TB_CHECK(st[2] && st[3], "B: FCS good, header match")
    if (st[2]) n_data_ok++;
    if (dut_b.u_costas.freq > 16'sd600 && dut_b.u_costas.freq < 16'sd920) n_cfo++;
    `TB_CHECK(dut_b.u_costas.freq > 16'sd600 && dut_b.u_costas.freq < 16'sd920, $sformatf("carrier offset tracked, freq %0d (exp 760)", dut_b.u_costas.freq))

    // 2. acknowledgement B -> A from the ACK buffer
    psdu = '{8'h02, 8'h00, 8'h11};
    send(1, psdu, 1);
    `TB_CHECK(irq[0], "A interrupt")
    check_rx(0, psdu, 1, st);
    `TB_CHECK(st[2], "A: ACK FCS good")
    if (st[2]) n_ack_ok++;

    // 3. frame to another node: B's header filter drops it
    make_frame(16'h0043, 8'h12, 6, psdu);
    send(0, psdu, 0);
    `TB_CHECK(!irq[1], "no interrupt for a foreign frame")
    reg_rd(1, REG_RXCOUNT, d);
    `TB_CHECK(d == 0, "foreign frame flushed")
    if (!irq[1] && d == 0) n_reject++;

    // 4. frame corrupted on air for one symbol in the payload
    make_frame(16'h0042, 8'h13, 10, psdu);
    fork
      send(0, psdu, 0);
      begin
        // preamble+SFD+length+12 octets at 600 clocks per bit
        wait (tx_on[0]);
        repeat (600 * 8 * 18) @(posedge clk);
        corrupt = 1;
        repeat (600) @(posedge clk);
        corrupt = 0;
      end
    join
    `TB_CHECK(irq[1], "B interrupt for the damaged frame")
    check_rx(1, psdu, 0, st);
    `TB_CHECK(!st[2], "FCS error detected")
    if (!st[2]) n_crc_err++;

    // 5. 915 MHz band, ACK of the same frame repeated then a data frame
    reg_wr(0, REG_CTRL, 8'h0B);
    reg_wr(1, REG_CTRL, 8'h0F);
    make_frame(16'hFFFF, 8'h14, 20, psdu);
    send(0, psdu, 0);
    check_rx(1, psdu, 1, st);
    `TB_CHECK(st[2] && st[3], "915 MHz frame received")
    if (st[2]) n_band915++;

    // every mechanism must have happened
    `TB_CHECK(n_agc_steps > 0, $sformatf("AGC steps: %0d", n_agc_steps))
    `TB_CHECK(n_rf_frames == 1, "RF SPI write")
    `TB_CHECK(n_data_ok == 1, "data frame received")
    `TB_CHECK(n_ack_ok == 1, "ACK frame received")
    `TB_CHECK(n_reject == 1, "header filter reject")
    `TB_CHECK(n_crc_err == 1, "FCS error")
    `TB_CHECK(n_band915 == 1, "915 MHz band")
    `TB_CHECK(n_cfo == 1, "carrier offset compensated")
    $display("mechanisms: agc_steps=%0d rf_spi=%0d data=%0d ack=%0d reject=%0d crc_err=%0d band915=%0d cfo=%0d",
             n_agc_steps, n_rf_frames, n_data_ok, n_ack_ok, n_reject, n_crc_err, n_band915, n_cfo);
    `TB_FINISH
  end
endmodule
