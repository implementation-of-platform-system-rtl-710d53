// Chip timing recovery. Of the 10 samples per chip it chooses the one nearest
// the chip centre and passes one I/Q sample per chip on. For each sample phase
// it accumulates |I| + |Q| over a window of WIN chips; at the end of the window
// the phase with the largest sum becomes the sampling phase for the next
// window (maximum energy timing, this design's choice; the modem description
// gives only the block's purpose). Chips are taken by a countdown of OSR
// samples; a change of phase by d (wrapped to -OSR/2..OSR/2-1) lengthens or
// shortens the next interval by d, so a move across the 9/0 boundary neither
// drops nor repeats a chip. chip_valid pulses with chip_i/chip_q one
// clock after the chosen sample's en. settled is high while the last two
// windows chose the same phase; the receiver starts symbol acquisition only
// then, so that a phase jump during acquisition cannot slip a chip.
module chip_timing_recovery #(
  parameter int unsigned IN_W = 6,
  parameter int unsigned OSR  = 10,
  parameter int unsigned WIN  = 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   chip_valid,
  output logic signed [IN_W-1:0] chip_i,
  output logic signed [IN_W-1:0] chip_q,
  output logic [3:0]             phase,
  output logic                   settled
);
  localparam int unsigned AW = IN_W + 1 + $clog2(WIN + 1);
  logic [AW-1:0] acc [OSR];
  logic [3:0] ph;
  logic [$clog2(WIN)-1:0] wcnt;
  logic [IN_W:0] mag;
  logic [3:0] best;
  logic [4:0] cd;                // samples until the next chip
  logic signed [4:0] adj, delta; // pending interval correction

  assign mag = (IN_W+1)'(in_i < 0 ? -in_i : in_i) + (IN_W+1)'(in_q < 0 ? -in_q : in_q);

  always_comb begin
    best = '0;
    for (int p = 1; p < OSR; p++)
      if (acc[p] > acc[best]) best = 4'(p);
  end

  // phase change, wrapped into -OSR/2 .. OSR/2-1
  always_comb begin
    int d;
    d = int'(best) - int'(phase);
    if (d >= int'(OSR / 2)) d = d - int'(OSR);
    else if (d < -int'(OSR / 2)) d = d + int'(OSR);
    delta = 5'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; wcnt <= '0; phase <= '0; settled <= 1'b0; cd <= '0; adj <= '0;
      chip_valid <= 1'b0; chip_i <= '0; chip_q <= '0;
      for (int p = 0; p < OSR; p++) acc[p] <= '0;
    end else begin
      chip_valid <= 1'b0;
      if (en) begin
        if (cd == 0) begin
          chip_valid <= 1'b1;
          chip_i     <= in_i;
          chip_q     <= in_q;
          cd         <= 5'(OSR - 1) + $unsigned(adj);
          adj        <= '0;
        end else begin
          cd <= cd - 1'b1;
        end
        ph <= (ph == 4'(OSR - 1)) ? '0 : ph + 1'b1;
        if (ph == 4'(OSR - 1) && wcnt == ($bits(wcnt))'(WIN - 1)) begin
          wcnt  <= '0;
          phase   <= best;
          settled <= (best == phase);
          adj     <= delta;
          for (int p = 0; p < OSR; p++) acc[p] <= '0;
        end else begin
          acc[ph] <= acc[ph] + AW'(mag);
          if (ph == 4'(OSR - 1)) wcnt <= wcnt + 1'b1;
        end
      end
    end
  end
endmodule
