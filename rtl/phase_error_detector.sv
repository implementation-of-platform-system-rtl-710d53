// Phase error detector of the BPSK Costas loop: err = sign(I) * Q. For a
// derotated chip whose residual phase is phi, Q ~ A sin(phi) carries the
// error and sign(I) removes the data modulation. Combinational. The Costas
// method is from the modem description; this decision-directed form is this
// design's choice.
module phase_error_detector #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] i,
  input  logic signed [W-1:0] q,
  output logic signed [W-1:0] err
);
  assign err = (i < 0) ? -q : q;
endmodule
