// Tx ACK buffer: holds the acknowledgement packet (from its length byte on) so
// that an ACK can be sent to a received frame without touching the Tx FIFO.
// The MCU appends bytes (wr_en) after clearing the buffer (clr). The framer
// reads it non-destructively: rd_rewind points back to the first byte and
// rd_en steps to the next, so the same ACK can be sent again. The buffer's
// purpose is from the modem description; its depth and access scheme are this
// design's choice.
module ack_buffer #(
  parameter int unsigned DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       wr_en,
  input  logic [7:0] wdata,
  input  logic       rd_rewind,
  input  logic       rd_en,
  output logic [7:0] rdata,
  output logic [$clog2(DEPTH+1)-1:0] fill
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];
  logic [AW-1:0] rp;

  assign rdata = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      rp   <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (clr) fill <= '0;
      else if (wr_en && fill < ($bits(fill))'(DEPTH)) begin
        mem[AW'(fill)] <= wdata;
        fill <= fill + 1'b1;
      end
      if (rd_rewind) rp <= '0;
      else if (rd_en) rp <= rp + 1'b1;
    end
  end
endmodule
