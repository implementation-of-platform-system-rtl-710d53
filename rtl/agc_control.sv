// Automatic gain control. With each new RSSI value it steps the PGA gain word
// by one (the PGA of the receiver moves 1 dB per step of its control word):
// down when RSSI > TARGET + HYST, up when RSSI < TARGET - HYST, limited to the
// GAIN_MIN..GAIN_MAX dB range of the receiver. freeze holds the gain while a
// packet is being received. The bang-bang law, target and hysteresis are this
// design's choice.
module agc_control #(
  parameter int unsigned GAIN_MIN = 10,
  parameter int unsigned GAIN_MAX = 100,
  parameter int unsigned TARGET   = 24,
  parameter int unsigned HYST     = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rssi,
  input  logic       rssi_valid,
  input  logic       freeze,
  output logic [6:0] gain,
  output logic       step_up,
  output logic       step_down
);
  assign step_down = rssi_valid && !freeze && (32'(rssi) > TARGET + HYST) && (32'(gain) > GAIN_MIN);
  assign step_up   = rssi_valid && !freeze && (32'(rssi) + HYST < TARGET) && (32'(gain) < GAIN_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gain <= 7'(GAIN_MAX);
    else if (step_down) gain <= gain - 1'b1;
    else if (step_up) gain <= gain + 1'b1;
  end
endmodule
