// MAC header filter: decides from the first octets of a received PSDU
// whether the frame is meant for this node. Octets 0-1 are the frame control
// field, 2 the sequence number, 3-4 the destination PAN ID and 5-6 the
// destination short address (little endian). A beacon frame (type 0) is
// always wanted; a frame with a short destination address (mode 2) is wanted
// when its PAN ID is the node's or 0xFFFF and its address the node's or
// 0xFFFF; with an extended destination only the PAN ID is checked; a frame
// without destination address is accepted. match is combinational from the
// stored header and is valid once the packet has ended. The block's role is
// from the modem description; the rules are IEEE 802.15.4's.
module header_filter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hdr_valid,
  input  logic [6:0]  hdr_idx,
  input  logic [7:0]  hdr_byte,
  input  logic [15:0] pan_id,
  input  logic [15:0] short_addr,
  output logic        match
);
  logic [15:0] fcf, dpan, daddr;
  logic [2:0]  seen;   // number of fields complete: 1 fcf, 2 pan, 3 addr
  logic [1:0]  dmode;
  logic        pan_ok, addr_ok;

  assign dmode   = fcf[11:10];
  assign pan_ok  = (seen >= 3'd2) && (dpan == pan_id || dpan == 16'hFFFF);
  assign addr_ok = (seen >= 3'd3) && (daddr == short_addr || daddr == 16'hFFFF);

  always_comb begin
    if (seen == 0) match = 1'b0;
    else if (fcf[2:0] == 3'd0) match = 1'b1;
    else case (dmode)
      2'd2:    match = pan_ok && addr_ok;
      2'd3:    match = pan_ok;
      2'd0:    match = 1'b1;
      default: match = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcf <= '0; dpan <= '0; daddr <= '0; seen <= '0;
    end else if (hdr_valid) begin
      case (hdr_idx)
        7'd0: begin fcf[7:0] <= hdr_byte; seen <= '0; end
        7'd1: begin fcf[15:8] <= hdr_byte; seen <= 3'd1; end
        7'd3: dpan[7:0] <= hdr_byte;
        7'd4: begin dpan[15:8] <= hdr_byte; seen <= 3'd2; end
        7'd5: daddr[7:0] <= hdr_byte;
        7'd6: begin daddr[15:8] <= hdr_byte; seen <= 3'd3; end
        default: ;
      endcase
    end
  end
endmodule
