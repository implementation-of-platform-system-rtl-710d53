// Differential encoder of the transmitter: E_n = R_n xor E_(n-1), the rule
// given for the modem. e = r xor E_(n-1) is combinational, so the spreader can
// take the encoded bit in the same clock as it asks for it; en (the spreader's
// bit request) stores e as the new E_(n-1). clear sets E_(-1) = 0 at the start
// of a packet (this design's choice, as in IEEE 802.15.4).
module diff_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic r,
  output logic e
);
  logic prev;
  assign e = r ^ prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev <= 1'b0;
    else if (clear) prev <= 1'b0;
    else if (en) prev <= e;
  end
endmodule
