// SPI control of the RF transceiver: writes one 16-bit control word, address
// octet then data octet, MSB first, SPI mode 0, into the RF IC (PLL channel,
// PGA and bias settings). start (while not busy) loads {addr, data}; SCLK runs
// at clk/(2*DIV); MOSI changes on the falling edge; CS_N is low for the 16
// bits. busy is high from start until CS_N returns high. The SPI link to the
// RF part is from the modem description; the frame format is this design's.
module rf_spi_master #(
  parameter int unsigned DIV = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       sclk,
  output logic       cs_n,
  output logic       mosi
);
  logic [15:0] sh;
  logic [4:0]  nbit;
  logic [$clog2(DIV)-1:0] div;

  assign mosi = sh[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nbit <= '0; div <= '0; busy <= 1'b0; sclk <= 1'b0; cs_n <= 1'b1;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cs_n <= 1'b0;
        sh   <= {addr, data};
        nbit <= '0;
        div  <= '0;
      end
    end else if (div == ($bits(div))'(DIV - 1)) begin
      div <= '0;
      if (nbit == 5'd16) begin
        busy <= 1'b0;
        cs_n <= 1'b1;
      end else if (!sclk) begin
        sclk <= 1'b1;
      end else begin
        sclk <= 1'b0;
        sh   <= {sh[14:0], 1'b0};
        nbit <= nbit + 1'b1;
      end
    end else begin
      div <= div + 1'b1;
    end
  end
endmodule
