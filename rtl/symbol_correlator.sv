// Symbol correlator with symbol synchronisation. Each chip is decided by the
// sign of the derotated I sample (chip 1 for I >= 0) and shifted into a
// 15-chip window, oldest chip aligned with C0. The window is compared with the
// bit-0 PN pattern; m is the number of matching chips (0..15).
//   Hunting: when m >= ACQ_THR or m <= 15-ACQ_THR the symbol boundary is
//            found (the PN sequence has a sharp autocorrelation peak), the
//            bit is decided and the correlator locks.
//   Locked:  one decision every 15 chips, bit = 0 when m >= 8, else 1.
// bit_valid pulses one clock after the chip that ends a symbol. clear drops
// the lock; acquisition is only allowed while acq_en is high. Correlating with the 15-chip pattern is from the modem
// description; hard chip decisions and the thresholds are this design's.
module symbol_correlator
  import lrwpan_pkg::*;
#(
  parameter int unsigned ACQ_THR = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              acq_en,
  input  logic              chip_valid,
  input  logic signed [7:0] chip_i,
  output logic              bit_valid,
  output logic              bit_o,
  output logic              locked,
  output logic [3:0]        match
);
  logic [14:0] sr, sr_n;
  logic [3:0]  cnt;
  logic [3:0]  m;

  assign sr_n = {sr[13:0], (chip_i >= 0)};
  always_comb begin
    m = '0;
    for (int k = 0; k < 15; k++)
      m = m + 4'(sr_n[k] == PN_BIT0[14 - k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; cnt <= '0; locked <= 1'b0; bit_valid <= 1'b0; bit_o <= 1'b0; match <= '0;
    end else begin
      bit_valid <= 1'b0;
      if (clear) begin
        locked <= 1'b0;
        cnt    <= '0;
      end else if (chip_valid) begin
        sr <= sr_n;
        if (!locked) begin
          if (acq_en && (32'(m) >= ACQ_THR || 32'(m) <= 15 - ACQ_THR)) begin
            locked    <= 1'b1;
            cnt       <= '0;
            bit_valid <= 1'b1;
            bit_o     <= (m < 4'd8);
            match     <= m;
          end
        end else if (cnt == 4'd14) begin
          cnt       <= '0;
          bit_valid <= 1'b1;
          bit_o     <= (m < 4'd8);
          match     <= m;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
