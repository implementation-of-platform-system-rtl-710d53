// Byte FIFO used as the Tx FIFO (packet from length byte to last payload
// octet, written by the MCU, read by the framer) and as the Rx FIFO (received
// packet from the length byte on, written by the deframer, read by the MCU).
// Single clock, first-word-fall-through: rdata shows the head whenever
// empty is low; rd_en pops it. A push into a full FIFO and a pop from an empty
// one are ignored. flush empties it. Depth and width are this design's choice
// (128 bytes holds the largest PSDU plus its length byte).
module sync_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == ($bits(count))'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= ($bits(count))'(DEPTH));
endmodule
