// Testbench of rx_deframer: bit streams of preamble zeros, SFD 0xA7, length,
// payload and FCS (LSB first). Checks the octets written to the Rx FIFO
// (length first), the header octets and indices, crc_ok for good frames and
// for a frame with one flipped bit, and hunt_abort when no SFD comes.
`include "tb/tb_util.svh"
module tb_rx_deframer;
  logic clk = 0, rst_n = 1, start = 0, bit_valid = 0, bit_i = 0;
  logic fifo_wr, hdr_valid, busy, done, crc_ok, hunt_abort;
  logic [7:0] fifo_wdata, hdr_byte;
  logic [6:0] hdr_idx;
  int checks = 0, failures = 0;
  byte unsigned wr_q[$];
  int hdr_bad, n_done, n_abort;
  logic last_crc;
  always #5 clk = ~clk;
  rx_deframer #(.HUNT_BITS(64), .MIN_LEN(5)) dut (.*);
  `TB_WATCHDOG(200000)

  always @(posedge clk) begin
    if (fifo_wr) wr_q.push_back(fifo_wdata);
    if (hdr_valid && (hdr_byte != fifo_wdata || 32'(hdr_idx) != wr_q.size() - 2)) hdr_bad++;
    if (done) begin n_done++; last_crc = crc_ok; end
    if (hunt_abort) n_abort++;
  end

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

  task automatic send_bits(byte unsigned oct[$], input int flip);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    foreach (oct[i])
      for (int b = 0; b < 8; b++) begin
        bit_valid = 1;
        bit_i = oct[i][b] ^ (i * 8 + b == flip);
        @(negedge clk);
        bit_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    byte unsigned pay[$], oct[$], expq[$];
    logic [15:0] f;
    hdr_bad = 0; n_done = 0; n_abort = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      pay.delete();
      for (int i = 0; i < $urandom_range(3, 40); i++) pay.push_back(8'($urandom));
      f = crc_model(pay);
      oct = '{8'h00, 8'h00, 8'h00, 8'hA7, 8'(pay.size() + 2)};
      foreach (pay[i]) oct.push_back(pay[i]);
      oct.push_back(f[7:0]); oct.push_back(f[15:8]);
      expq = oct[4:$];
      wr_q.delete();
      send_bits(oct, (t == 3) ? 8 * 7 + 3 : -1);
      `TB_CHECK(n_done == t + 1, $sformatf("done count %0d", n_done))
      `TB_CHECK(last_crc == (t != 3), $sformatf("crc_ok %0d in frame %0d", last_crc, t))
      `TB_CHECK(wr_q.size() == expq.size(), "octets written")
      if (t != 3) `TB_CHECK(wr_q == expq, "FIFO content")
    end
    `TB_CHECK(hdr_bad == 0, "header octets and indices")
    // no SFD
    oct.delete();
    for (int i = 0; i < 10; i++) oct.push_back(8'h00);
    send_bits(oct, -1);
    `TB_CHECK(n_abort == 1, "hunt_abort without SFD")
    // too short a length
    oct = '{8'h00, 8'hA7, 8'h03, 8'h00, 8'h00, 8'h00};
    send_bits(oct, -1);
    `TB_CHECK(n_abort == 2, "hunt_abort on short length")
    `TB_CHECK(n_done == 5, "no done for rejected frames")
    `TB_FINISH
  end
endmodule
