// Carrier offset compensation by a second-order Costas loop, one update per
// en. In the modem it runs on every sample (10 per chip), ahead of chip timing
// recovery, so that offsets of up to 80 ppm (73 kHz at 915 MHz, about 0.12
// turns per chip) stay well inside its tracking range (0.025 turns per
// update). An NCO phase theta (2^16 = one turn) derotates the sample:
//   out_i = (I cos(theta) + Q sin(theta)) >>> 7
//   out_q = (Q cos(theta) - I sin(theta)) >>> 7
// using a 64-entry sine table. The phase error e = sign(out_i)*out_q from the
// phase error detector drives a PI loop filter:
//   freq  <= freq + (e <<< KI_SH)
//   theta <= theta + freq + (e <<< KP_SH)
// freq is the frequency estimate in NCO units per update. The loop leaves a
// 180 degree ambiguity, removed by the differential coding. clear restarts
// the loop. Outputs are registered; out_valid follows en by one clock.
// Using a Costas loop is from the modem description, as is its place right
// after DC offset removal in the receive chain; the NCO, table, loop gains and
// the update rate are this design's choice.
module carrier_offset_comp
  import lrwpan_pkg::*;
#(
  parameter int unsigned IN_W  = 6,
  parameter int unsigned KP_SH = 6,
  parameter int unsigned KI_SH = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   en,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   out_valid,
  output logic signed [7:0]      out_i,
  output logic signed [7:0]      out_q,
  output logic signed [15:0]     freq
);
  logic [15:0] theta;
  logic signed [7:0] s, c;
  logic signed [15:0] ri, rq;
  logic signed [7:0] di, dq, err;

  assign s  = sin64(theta[15:10]);
  assign c  = sin64(theta[15:10] + 6'd16);
  assign ri = 16'(in_i * c) + 16'(in_q * s);
  assign rq = 16'(in_q * c) - 16'(in_i * s);
  assign di = 8'(ri >>> 7);
  assign dq = 8'(rq >>> 7);

  phase_error_detector #(.W(8)) u_ped (.i(di), .q(dq), .err(err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta <= '0; freq <= '0; out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= en && !clear;
      if (clear) begin
        theta <= '0;
        freq  <= '0;
      end else if (en) begin
        out_i <= di;
        out_q <= dq;
        freq  <= freq + (16'(err) <<< KI_SH);
        theta <= theta + freq + (16'(err) <<< KP_SH);
      end
    end
  end
endmodule
