// Testbench of carrier_offset_comp: random BPSK chips of amplitude 7 rotated
// by a carrier whose phase advances F turns per update (F up to 0.025; in the
// modem one update is one sample, so 0.025 is 150 kHz at 6 Msample/s) plus a
// start phase. After acquisition the
// derotated chips must carry the data on I (up to one common sign) with small
// Q, and the loop's frequency estimate must match F * 65536.
`include "tb/tb_util.svh"
module tb_carrier_offset_comp;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic signed [5:0] in_i = 0, in_q = 0;
  logic out_valid;
  logic signed [7:0] out_i, out_q;
  logic signed [15:0] freq;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  always #5 clk = ~clk;
  carrier_offset_comp #(.IN_W(6)) dut (.*);
  `TB_WATCHDOG(200000)
  initial begin
    real fo, ph;
    int d, sgn, errs, nq;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      fo = (trial == 0) ? 0.0 : (trial == 1) ? 0.0061 : (trial == 2) ? -0.012 : 0.025;
      ph = 0.3 * trial + 0.2;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      errs = 0; nq = 0; sgn = 0;
      for (int c = 0; c < 1500; c++) begin
        d = $urandom_range(0, 1) ? 7 : -7;
        in_i = 6'($rtoi($floor(d * $cos(2 * PI * ph) + 0.5)));
        in_q = 6'($rtoi($floor(d * $sin(2 * PI * ph) + 0.5)));
        ph = ph + fo;
        en = 1;
        @(negedge clk);
        en = 0;
        if (c >= 700) begin
          if (sgn == 0) sgn = ((out_i >= 0) == (d > 0)) ? 1 : -1;
          if (((out_i >= 0) == (d > 0)) != (sgn == 1)) errs++;
          if (out_q > 3 || out_q < -3) nq++;
        end
        @(negedge clk);
      end
      `TB_CHECK(errs == 0, $sformatf("trial %0d: %0d chip errors after lock", trial, errs))
      `TB_CHECK(nq < 40, $sformatf("trial %0d: %0d chips with |Q|>3", trial, nq))
      `TB_CHECK(freq > $rtoi(fo * 65536.0) - 200 && freq < $rtoi(fo * 65536.0) + 200,
                $sformatf("trial %0d: freq %0d exp %0d", trial, freq, $rtoi(fo * 65536.0)))
    end
    `TB_FINISH
  end
endmodule
