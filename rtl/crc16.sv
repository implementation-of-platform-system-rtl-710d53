// Bit-serial frame check sequence generator/checker, polynomial
// x^16 + x^12 + x^5 + 1, remainder cleared to zero by init, data bits fed LSB
// first (IEEE 802.15.4 FCS). The transmitter appends crc[0] first; the receiver
// compares the remainder over the payload with the received FCS. One bit per
// clock when en is high. The modem description names a CRC block; the
// polynomial is the one of the standard the modem implements.
module crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic        din,
  output logic [15:0] crc
);
  logic fb;
  // Reflected form: register bit 0 is the oldest coefficient.
  assign fb = din ^ crc[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crc <= '0;
    else if (init) crc <= '0;
    else if (en) crc <= ({1'b0, crc[15:1]}) ^ (fb ? 16'h8408 : 16'h0000);
  end
endmodule
