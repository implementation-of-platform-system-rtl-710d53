// Carrier offset sweep of the modem pair: for carrier frequency offsets of
// -80, -40, 0, +40 and +80 ppm of the carrier (868.3 MHz or 906 MHz) node A
// sends NPKT short frames of character data and then one frame of the
// largest size (127-octet PSDU) to node B in each band, and the frames B
// receives with a good FCS and correct content are counted. Node A runs on
// its own clock, off by the same ppm as its carrier, so the receiver's chip
// timing must follow the drift as well (1.3 chips over the long frame at
// 80 ppm). Every frame must arrive at every offset. The modem's carrier offset compensation
// is specified for a packet error rate below 1 %; NPKT = 20 frames per point
// keeps the run short and can only show a rate below about 5 %, so raise NPKT
// to 100 or more to test the 1 % figure itself. The channel, node and MCU
// models are those of tb_lrwpan_modem.
`include "tb/tb_util.svh"
module tb_lrwpan_cfo_per;
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
  real F_OFF;   // carrier offset, turns per clock
  // Node B runs on clk. Node A, the transmitter, runs on clk_a, derived in
  // its own radio from the same crystal as its carrier: a crystal error of
  // +x ppm raises A's carrier by x ppm and shortens clk_a's period by x ppm.
  // A half period of 50000 time units makes 20 ppm one unit.
  localparam int HALF = 50_000;
  logic clk_a = 0;
  int half_a = HALF;
  always #(HALF) clk = ~clk;
  always #(half_a) clk_a = ~clk_a;

  lrwpan_modem dut_a (
    .clk(clk_a), .rst_n, .mcu_sclk(sclk[0]), .mcu_cs_n(cs_n[0]), .mcu_mosi(mosi[0]), .mcu_miso(miso[0]),
    .irq(irq[0]), .rx_i(rx_i[0]), .rx_q(rx_q[0]), .tx_dac(tx_dac[0]), .tx_on(tx_on[0]),
    .pga_gain(pga[0]), .rf_sclk(rf_sclk[0]), .rf_cs_n(rf_cs_n[0]), .rf_mosi(rf_mosi[0])
  );
  lrwpan_modem dut_b (
    .clk, .rst_n, .mcu_sclk(sclk[1]), .mcu_cs_n(cs_n[1]), .mcu_mosi(mosi[1]), .mcu_miso(miso[1]),
    .irq(irq[1]), .rx_i(rx_i[1]), .rx_q(rx_q[1]), .tx_dac(tx_dac[1]), .tx_on(tx_on[1]),
    .pga_gain(pga[1]), .rf_sclk(rf_sclk[1]), .rf_cs_n(rf_cs_n[1]), .rf_mosi(rf_mosi[1])
  );

  `TB_WATCHDOG(70_000_000)

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

  localparam int NPKT = 20;
  initial begin
    byte unsigned psdu[$], st, d, got[$], cnt;
    int ok, ok_long, n_err_total;
    real ppm[5] = '{-80.0, -40.0, 0.0, 40.0, 80.0};
    real fc;
    string msg = "Hello, PAN!";
    for (int n = 0; n < 2; n++) begin sclk[n] = 0; cs_n[n] = 1; mosi[n] = 0; end
    ph = 0; corrupt = 0; n_agc_steps = 0; n_rf_frames = 0; n_a_done = 0; n_b_done = 0; rf_bits = 0;
    F_OFF = 0.0; n_err_total = 0;
    #1 rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int band = 0; band < 2; band++) begin
      fc = band ? 906.0e6 : 868.3e6;
      reg_wr(0, REG_CTRL, band ? 8'h0B : 8'h09);
      reg_wr(1, REG_CTRL, band ? 8'h0B : 8'h09);
      foreach (ppm[k]) begin
        F_OFF = fc * ppm[k] * 1.0e-6 / 12.0e6;
        half_a = HALF - $rtoi(ppm[k]) / 20;
        ok = 0;
        ok_long = 0;
        for (int p = 0; p <= NPKT; p++) begin
          if (p < NPKT) begin
            // "Hello n" style character payload
            make_frame(16'h0042, 8'(p), 0, psdu);
            for (int i = 0; i < msg.len(); i++) psdu.push_back(8'(msg[i]));
            psdu.push_back(8'h30 + 8'(p % 10));
          end else begin
            // then one frame of the largest size, a 127-octet PSDU
            make_frame(16'h0042, 8'(p), MAX_PSDU - 11, psdu);
          end
          send(0, psdu, 0);
          reg_rd(1, REG_STATUS, st);
          reg_rd(1, REG_RXCOUNT, cnt);
          burst_rd(1, REG_RXFIFO, cnt, got);
          if (st[1] && st[2] && cnt == psdu.size() + 3) begin
            bit same;
            same = 1;
            foreach (psdu[i]) if (got[i + 1] != psdu[i]) same = 0;
            if (same && p < NPKT) ok++;
            if (same && p == NPKT) ok_long++;
          end
          reg_wr(1, REG_CMD, 8'h24);
        end
        $display("band %0d MHz offset %0d ppm (%0d Hz): %0d of %0d frames received, NCO freq %0d",
                 band ? 915 : 868, $rtoi(ppm[k]), $rtoi(fc * ppm[k] * 1.0e-6), ok, NPKT, dut_b.u_costas.freq);
        `TB_CHECK(ok == NPKT, $sformatf("no frame lost at %0d ppm", $rtoi(ppm[k])))
        $display("  127-octet frame: %0s", ok_long ? "received" : "LOST");
        `TB_CHECK(ok_long == 1, $sformatf("127-octet frame received at %0d ppm", $rtoi(ppm[k])))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
