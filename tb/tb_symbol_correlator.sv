// Testbench of symbol_correlator: a random number of noise chips, then symbols
// of random bits (bit 0 = 111101011001000, bit 1 = complement), chips as
// +/-20 on I with random sign inversions of the whole stream. The correlator
// must lock on the first symbol and return every bit (inverted when the stream
// is inverted), with one decision per 15 chips; one chip error per symbol must
// still decode.
`include "tb/tb_util.svh"
module tb_symbol_correlator;
  logic clk = 0, rst_n = 1, clear = 0, chip_valid = 0, acq_en = 1;
  logic signed [7:0] chip_i = 0;
  logic bit_valid, bit_o, locked;
  logic [3:0] match;
  int checks = 0, failures = 0;
  localparam logic [14:0] P0 = 15'b111101011001000;  // C0 in bit 14
  always #5 clk = ~clk;
  symbol_correlator #(.ACQ_THR(14)) dut (.*);
  `TB_WATCHDOG(200000)

  bit got[$];
  always @(posedge clk) if (bit_valid) got.push_back(bit_o);

  task automatic chip_out(input bit c, input bit inv);
    @(negedge clk);
    chip_valid = 1;
    chip_i = ((c ^ inv) ? 8'sd20 : -8'sd20);
    @(negedge clk);
    chip_valid = 0;
  endtask

  initial begin
    bit bits[$];
    bit inv;
    int lead, nerr;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      inv = trial[0];
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      got.delete(); bits.delete();
      // noise that never matches well: alternating chips
      lead = $urandom_range(0, 14);
      for (int k = 0; k < lead; k++) chip_out(k[0], 0);
      `TB_CHECK(!locked, "no lock on lead-in")
      if (trial == 5) begin
        // acquisition disabled: a whole symbol must not lock
        acq_en = 0;
        for (int k = 0; k < 15; k++) chip_out(P0[14 - k], inv);
        `TB_CHECK(!locked, "no lock while acq_en is low")
        acq_en = 1;
        for (int k = 0; k < 5; k++) chip_out(k[0], 0);
      end
      bits.push_back(0);
      for (int s = 0; s < 30; s++) bits.push_back(1'($urandom));
      foreach (bits[s]) begin
        int bad;
        bad = (s > 0 && trial >= 2) ? $urandom_range(0, 14) : -1;
        for (int k = 0; k < 15; k++) chip_out(P0[14 - k] ^ bits[s] ^ (k == bad), inv);
      end
      @(negedge clk);
      `TB_CHECK(locked, "locked")
      `TB_CHECK(got.size() == bits.size(), $sformatf("bit count %0d exp %0d", got.size(), bits.size()))
      nerr = 0;
      foreach (got[i]) if (i < bits.size() && got[i] != (bits[i] ^ inv)) nerr++;
      `TB_CHECK(nerr == 0, $sformatf("trial %0d: %0d bit errors", trial, nerr))
    end
    `TB_FINISH
  end
endmodule
