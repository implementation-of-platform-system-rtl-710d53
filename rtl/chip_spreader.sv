// Symbol-to-chip mapping (data spreading). Each encoded bit becomes the
// 15-chip PN sequence of the modem description: bit 0 sends
// 1 1 1 1 0 1 0 1 1 0 0 1 0 0 0 (C0 first), bit 1 its complement. On the
// chip_tick that starts a symbol the spreader takes bit_i and pulses bit_rd;
// chip/chip_valid then hold chip C0 and change on each following chip_tick.
// A symbol, once started, is always completed; when run is low at a symbol
// boundary chip_valid drops.
module chip_spreader
  import lrwpan_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic chip_tick,
  input  logic run,
  input  logic bit_i,
  output logic bit_rd,
  output logic chip,
  output logic chip_valid
);
  logic [3:0] idx;   // index of the next chip to send
  logic       cur;

  assign bit_rd = chip_tick && (idx == 0) && run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; cur <= 1'b0; chip <= 1'b0; chip_valid <= 1'b0;
    end else if (chip_tick) begin
      if (idx == 0) begin
        if (run) begin
          cur        <= bit_i;
          chip       <= PN_BIT0[0] ^ bit_i;
          chip_valid <= 1'b1;
          idx        <= 4'd1;
        end else begin
          chip_valid <= 1'b0;
        end
      end else begin
        chip <= PN_BIT0[idx] ^ cur;
        idx  <= (idx == 4'(CHIPS_PER_SYM - 1)) ? '0 : idx + 1'b1;
      end
    end
  end
endmodule
