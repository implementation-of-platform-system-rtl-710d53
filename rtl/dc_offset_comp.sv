// DC offset compensation of the I and Q ADC samples. A first-order leaky
// integrator per rail tracks the mean with a time constant of 2^K samples:
//   acc <= acc + x - (acc >>> K),   mean = acc >>> K,   out = x - mean.
// The block's purpose is from the modem description; the estimator is this
// design's choice. Inputs are 4-bit signed ADC codes, outputs 6-bit signed,
// registered on each en (sample strobe).
module dc_offset_comp #(
  parameter int unsigned ADC_W = 4,
  parameter int unsigned OUT_W = 6,
  parameter int unsigned K     = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [ADC_W-1:0] in_i,
  input  logic signed [ADC_W-1:0] in_q,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);
  localparam int unsigned AW = ADC_W + K + 1;
  logic signed [AW-1:0] acc_i, acc_q;
  logic signed [AW-1:0] mean_i, mean_q;

  assign mean_i = acc_i >>> K;
  assign mean_q = acc_q >>> K;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0; out_i <= '0; out_q <= '0;
    end else if (en) begin
      acc_i <= acc_i + AW'(in_i) - mean_i;
      acc_q <= acc_q + AW'(in_q) - mean_q;
      out_i <= OUT_W'(AW'(in_i) - mean_i);
      out_q <= OUT_W'(AW'(in_q) - mean_q);
    end
  end
endmodule
