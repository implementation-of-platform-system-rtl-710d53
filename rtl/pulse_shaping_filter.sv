// Pulse shaping filter of the transmitter. The chips are oversampled 10 times
// (one chip value followed by nine zeros) and filtered by the 61-tap raised
// cosine of roll-off 1 given for the modem, h[n] = p((n-30)/10 Tc). Because
// only every tenth input is non-zero the filter is computed in polyphase form:
// at sample phase p (0..9 after a chip_tick) the output is
//   y = sum_{j=0..6} x_j * h[p + 10 j]
// where x_j is the j-th most recent chip (+1, -1, or 0 when no chip was sent).
// The 9-bit taps are scaled so that |y| <= 254; dac = y >>> 3 is a 6-bit
// signed DAC code. dac is registered and changes one clock after each
// sample_tick. active stays high until the last chip has left the filter.
module pulse_shaping_filter
  import lrwpan_pkg::*;
#(
  parameter int unsigned DAC_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample_tick,
  input  logic                    chip_tick,
  input  logic                    chip,
  input  logic                    chip_valid,
  output logic signed [DAC_W-1:0] dac,
  output logic                    active
);
  localparam int unsigned NCH = 7;
  logic [NCH-1:0] cval, cvld;   // index 0 = newest chip
  logic [3:0]     ph;
  logic signed [11:0] acc;

  always_comb begin
    acc = '0;
    for (int j = 0; j < NCH; j++) begin
      int unsigned k;
      int unsigned d;
      k = 32'(ph) + 10 * j;
      d = (k >= 30) ? k - 30 : 30 - k;
      if (k <= 60 && cvld[j])
        acc = cval[j] ? acc + 12'(rc_tap(d)) : acc - 12'(rc_tap(d));
    end
  end

  assign active = |cvld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cval <= '0; cvld <= '0; ph <= '0; dac <= '0;
    end else begin
      if (sample_tick) begin
        if (chip_tick) begin
          cval <= {cval[NCH-2:0], chip};
          cvld <= {cvld[NCH-2:0], chip_valid};
          ph   <= '0;
        end else if (ph != 4'(OSR - 1)) begin
          ph <= ph + 1'b1;
        end
      end
      dac <= DAC_W'(acc >>> 3);
    end
  end
endmodule
