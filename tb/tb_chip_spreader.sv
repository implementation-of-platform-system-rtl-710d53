// Testbench of chip_spreader: random bits; every symbol must be the 15-chip
// pattern 111101011001000 (bit 0) or its complement (bit 1), C0 first, one
// chip per chip_tick, one bit request per 15 chips.
`include "tb/tb_util.svh"
module tb_chip_spreader;
  logic clk = 0, rst_n = 1, chip_tick = 0, run = 0, bit_i = 0;
  logic bit_rd, chip, chip_valid;
  int checks = 0, failures = 0;
  localparam logic [14:0] P0 = 15'b111101011001000; // C0 in bit 14
  bit sent[$];
  always #5 clk = ~clk;
  chip_spreader dut (.*);
  `TB_WATCHDOG(50000)

  initial begin
    int nchips, nreq;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run = 1;
    nchips = 0; nreq = 0;
    repeat (40 * 15) begin
      repeat (2) @(negedge clk);
      chip_tick = 1;
      if (nchips % 15 == 0) bit_i = 1'($urandom);
      #1;
      `TB_CHECK(bit_rd == (nchips % 15 == 0), "bit request at symbol start")
      if (bit_rd) begin sent.push_back(bit_i); nreq++; end
      @(negedge clk);
      chip_tick = 0;
      `TB_CHECK(chip_valid, "chip valid")
      `TB_CHECK(chip == (P0[14 - nchips % 15] ^ sent[nchips / 15]), "chip value")
      nchips++;
    end
    `TB_CHECK(nreq == 40, "one request per symbol")
    run = 0;
    repeat (2) begin
      @(negedge clk) chip_tick = 1;
      @(negedge clk) chip_tick = 0;
    end
    `TB_CHECK(!chip_valid, "stops when run is low")
    `TB_FINISH
  end
endmodule
