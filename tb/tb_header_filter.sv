// Testbench of header_filter: frames with short destination addressing to the
// node, to broadcast, to another node or PAN; a beacon; a frame with extended
// destination; an acknowledgement without destination.
`include "tb/tb_util.svh"
module tb_header_filter;
  logic clk = 0, rst_n = 1, hdr_valid = 0;
  logic [6:0] hdr_idx = 0;
  logic [7:0] hdr_byte = 0;
  logic [15:0] pan_id = 16'h1234, short_addr = 16'h0042;
  logic match;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  header_filter dut (.*);
  `TB_WATCHDOG(10000)

  task automatic frame(input logic [15:0] fcf, input logic [15:0] dpan, input logic [15:0] dad,
                       input int n, input bit expect_match, input string what);
    byte unsigned h[12];
    h = '{fcf[7:0], fcf[15:8], 8'h07, dpan[7:0], dpan[15:8], dad[7:0], dad[15:8], 8'h11, 8'h22, 8'h33, 8'h44, 8'h55};
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      hdr_valid = 1; hdr_idx = 7'(i); hdr_byte = h[i];
    end
    @(negedge clk) hdr_valid = 0;
    `TB_CHECK(match == expect_match, what)
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // data frame, short dest: fcf type 1, dest mode 2 (bits 11:10)
    frame(16'h0801 | 16'h8000, 16'h1234, 16'h0042, 12, 1, "own address");
    frame(16'h0801, 16'h1234, 16'h0043, 12, 0, "other address");
    frame(16'h0801, 16'h1235, 16'h0042, 12, 0, "other PAN");
    frame(16'h0801, 16'hFFFF, 16'hFFFF, 12, 1, "broadcast");
    frame(16'h0801, 16'h1234, 16'hFFFF, 9, 1, "broadcast address");
    frame(16'h0000, 16'h9999, 16'h9999, 10, 1, "beacon");
    frame(16'h0C01, 16'h1234, 16'h5555, 12, 1, "extended dest, own PAN");
    frame(16'h0C01, 16'h4321, 16'h5555, 12, 0, "extended dest, other PAN");
    frame(16'h0002, 16'h0000, 16'h0000, 5, 1, "ack without destination");
    frame(16'h0801, 16'h1234, 16'h0042, 4, 0, "header cut short");
    `TB_FINISH
  end
endmodule
