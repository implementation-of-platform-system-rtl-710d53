// Differential decoder of the receiver, the inverse of the transmit rule
// E_n = R_n xor E_(n-1): R_n = E_n xor E_(n-1). It removes the 180 degree
// ambiguity left by the Costas carrier loop, because an inverted stream
// decodes to the same bits. en accepts a received bit e; r/r_valid give the
// decoded bit one clock later. clear forgets the previous bit (set to 0).
module diff_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic e,
  output logic r,
  output logic r_valid
);
  logic prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= 1'b0; r <= 1'b0; r_valid <= 1'b0;
    end else begin
      r_valid <= en && !clear;
      if (clear) prev <= 1'b0;
      else if (en) begin
        r    <= e ^ prev;
        prev <= e;
      end
    end
  end
endmodule
