// Testbench of diff_decoder: random raw bits are encoded by a model of
// E_n = R_n xor E_(n-1) (optionally inverted, as after a 180 degree carrier
// slip) and the decoder must return the raw bits after the first one.
`include "tb/tb_util.svh"
module tb_diff_decoder;
  logic clk = 0, rst_n = 1, clear = 0, en = 0, e = 0, r, r_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  diff_decoder dut (.*);
  `TB_WATCHDOG(10000)
  initial begin
    logic enc, raw, inv;
    int got;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 4; pkt++) begin
      inv = pkt[0];
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      enc = 0; got = 0;
      for (int i = 0; i < 50; i++) begin
        raw = 1'($urandom);
        enc = raw ^ enc;
        e = enc ^ inv; en = 1;
        @(negedge clk);
        en = 0;
        `TB_CHECK(r_valid, "r_valid")
        if (i > 0 || !inv) `TB_CHECK(r == raw, "decoded bit")
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    `TB_FINISH
  end
endmodule
