// Testbench of tx_framer: a FIFO model and an ACK buffer model feed packets;
// the bits taken with a random bit_rd pattern must be 32 zero bits, the SFD
// 0xA7, the length octet, the payload and the FCS (CRC-16 model, low octet
// first), all LSB first. Checks the number of octets popped and done.
`include "tb/tb_util.svh"
module tb_tx_framer;
  logic clk = 0, rst_n = 1, start = 0, use_ack = 0, bit_rd = 0;
  logic [7:0] fifo_rdata, ack_rdata;
  logic fifo_rd, ack_rd, ack_rewind, bit_o, bit_valid, busy, done;
  int checks = 0, failures = 0;
  byte unsigned fifo_q[$], ackm[8];
  int ack_rp;
  always #5 clk = ~clk;
  tx_framer dut (.*);
  `TB_WATCHDOG(200000)

  assign fifo_rdata = (fifo_q.size() > 0) ? fifo_q[0] : 8'h00;
  assign ack_rdata  = ackm[ack_rp];
  always @(posedge clk) begin
    if (fifo_rd) void'(fifo_q.pop_front());
    if (ack_rewind) ack_rp <= 0;
    else if (ack_rd) ack_rp <= ack_rp + 1;
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

  task automatic send(input bit ack, input byte unsigned pay[$]);
    byte unsigned exp_bytes[$];
    logic [15:0] fcs;
    bit got[$];
    int nbits, len;
    len = pay.size() + 2;
    fcs = crc_model(pay);
    exp_bytes = '{8'h00, 8'h00, 8'h00, 8'h00, 8'hA7, 8'(len)};
    foreach (pay[i]) exp_bytes.push_back(pay[i]);
    exp_bytes.push_back(fcs[7:0]);
    exp_bytes.push_back(fcs[15:8]);
    if (ack) begin
      ackm[0] = 8'(len);
      foreach (pay[i]) ackm[i + 1] = pay[i];
    end else begin
      fifo_q.push_back(8'(len));
      foreach (pay[i]) fifo_q.push_back(pay[i]);
    end
    @(negedge clk); start = 1; use_ack = ack;
    @(negedge clk); start = 0;
    while (busy) begin
      bit_rd = ($urandom_range(0, 3) == 0);
      if (bit_rd) got.push_back(bit_o);
      @(negedge clk);
      bit_rd = 0;
      if (done) `TB_CHECK(!busy, "done at end")
    end
    nbits = exp_bytes.size() * 8;
    `TB_CHECK(got.size() == nbits, "bit count")
    for (int i = 0; i < nbits && i < got.size(); i++)
      if (got[i] !== exp_bytes[i / 8][i % 8]) begin
        `TB_CHECK(0, $sformatf("bit %0d of %s packet", i, ack ? "ack" : "data"))
        break;
      end
    checks++;
    if (!ack) `TB_CHECK(fifo_q.size() == 0, "all FIFO octets popped")
  endtask

  initial begin
    byte unsigned p[$];
    ack_rp = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      p.delete();
      for (int i = 0; i < $urandom_range(1, 30); i++) p.push_back(8'($urandom));
      send(0, p);
    end
    p = '{8'h02, 8'h00, 8'h5A};
    send(1, p);
    send(1, p);
    p.delete();
    send(0, p);   // length 2: FCS only
    `TB_FINISH
  end
endmodule
