// Received signal strength indicator. Running at the sample rate (10x the chip
// rate) it sums Ri*Ri + Rq*Rq over one symbol, N = 15 chips x 10 samples =
// 150 samples, and outputs the average, as the modem description specifies.
// The division by 150 is done as sum * 437 >> 16 (437/65536 = 1/149.97), the
// result saturated to 8 bits. valid pulses for one clock with each new value;
// the window is free running.
module rssi_estimator #(
  parameter int unsigned IN_W = 6,
  parameter int unsigned N    = 150,
  parameter int unsigned RECIP = 437   // round(65536 / N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic [7:0]             rssi,
  output logic                   valid
);
  localparam int unsigned SW = 2 * IN_W + 1 + $clog2(N);
  logic [SW-1:0] sum;
  logic [$clog2(N)-1:0] cnt;
  logic [2*IN_W:0] pwr;
  logic [SW+9:0] scaled;
  logic [SW-1:0] total;

  assign pwr    = (2*IN_W+1)'(in_i * in_i) + (2*IN_W+1)'(in_q * in_q);
  assign total  = sum + SW'(pwr);
  assign scaled = (SW+10)'(total) * (SW+10)'(RECIP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; cnt <= '0; rssi <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        if (cnt == ($bits(cnt))'(N - 1)) begin
          cnt   <= '0;
          sum   <= '0;
          valid <= 1'b1;
          rssi  <= ((scaled >> 16) > 255) ? 8'hFF : 8'(scaled >> 16);
        end else begin
          cnt <= cnt + 1'b1;
          sum <= total;
        end
      end
    end
  end
endmodule
