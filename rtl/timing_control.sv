// Timing and control generation: derives the baseband strobes from the system
// clock. The modem runs at 10 samples per chip; the chip rate is 300 kchip/s in
// the 868 MHz band and 600 kchip/s in the 915 MHz band. sample_tick pulses once
// per sample, chip_tick once per chip (together with the sample_tick that opens
// the chip). With the default 12 MHz clock the sample strobe comes every 4
// (868) or 2 (915) clocks. The chip rates and the 10x oversampling are from the
// modem description; the clock frequency is this design's choice and must be a
// multiple of 10x the chip rate.
module timing_control #(
  parameter int unsigned CLK_HZ        = 12_000_000,
  parameter int unsigned OSR           = 10,
  parameter int unsigned CHIP_RATE_868 = 300_000,
  parameter int unsigned CHIP_RATE_915 = 600_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic band_915,
  output logic sample_tick,
  output logic chip_tick
);
  localparam int unsigned DIV_868 = CLK_HZ / (CHIP_RATE_868 * OSR);
  localparam int unsigned DIV_915 = CLK_HZ / (CHIP_RATE_915 * OSR);
  localparam int unsigned CW = $clog2(DIV_868 + 1);

  logic [CW-1:0] div_cnt;
  logic [$clog2(OSR)-1:0] ph_cnt;
  logic [CW-1:0] div_last;

  assign div_last    = band_915 ? CW'(DIV_915 - 1) : CW'(DIV_868 - 1);
  assign sample_tick = (div_cnt == 0);
  assign chip_tick   = sample_tick && (ph_cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      ph_cnt  <= '0;
    end else begin
      div_cnt <= (div_cnt >= div_last) ? '0 : div_cnt + 1'b1;
      if (sample_tick)
        ph_cnt <= (ph_cnt == $bits(ph_cnt)'(OSR - 1)) ? '0 : ph_cnt + 1'b1;
    end
  end
endmodule
