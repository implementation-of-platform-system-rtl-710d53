// Testbench of crc16: the check value of this CRC (polynomial 0x1021,
// reflected, zero start, no final inversion) over ASCII "123456789" is
// 0x2189; a frame followed by its own FCS (low octet first) must leave a zero
// remainder; random messages are compared with a byte-wise table-free model.
`include "tb/tb_util.svh"
module tb_crc16;
  logic clk = 0, rst_n = 1, init = 0, en = 0, din = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  crc16 dut (.*);
  `TB_WATCHDOG(100000)

  // Model in the non-reflected form on bit-reversed data and result.
  function automatic logic [15:0] model(byte unsigned m[$]);
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

  task automatic feed(byte unsigned m[$]);
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    foreach (m[i])
      for (int b = 0; b < 8; b++) begin
        en = 1; din = m[i][b];
        @(negedge clk);
      end
    en = 0;
  endtask

  initial begin
    byte unsigned m[$];
    logic [15:0] c;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    feed(m);
    `TB_CHECK(crc == 16'h2189, "check value 123456789")
    for (int t = 0; t < 50; t++) begin
      m.delete();
      for (int i = 0; i < $urandom_range(1, 20); i++) m.push_back(8'($urandom));
      feed(m);
      c = crc;
      `TB_CHECK(c == model(m), "random message vs model")
      m.push_back(c[7:0]);
      m.push_back(c[15:8]);
      feed(m);
      `TB_CHECK(crc == 0, "zero remainder with FCS")
    end
    `TB_FINISH
  end
endmodule
