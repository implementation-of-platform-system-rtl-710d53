// SFD detection and CRC check of the receiver. After symbol lock (start) it
// looks for the SFD in the decoded bit stream (LSB first). The octet that
// follows is the length; the length octet and the length PSDU octets that
// follow it are written to the Rx FIFO, and the PSDU octets are also passed
// with their index to the header filter. All PSDU bits, FCS included, run
// through the CRC; a zero remainder at the end means the FCS is correct.
// done pulses at the end with crc_ok valid. If no SFD comes within
// HUNT_BITS bits, or the length is below MIN_LEN, the search is abandoned
// (hunt_abort pulses, so the correlator can look again). busy is high from SFD to
// the end of the packet. SFD value and FCS follow IEEE 802.15.4; the rest is
// this design's choice.
module rx_deframer
  import lrwpan_pkg::*;
#(
  parameter int unsigned HUNT_BITS = 64,
  parameter int unsigned MIN_LEN   = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       bit_valid,
  input  logic       bit_i,
  output logic       fifo_wr,
  output logic [7:0] fifo_wdata,
  output logic       hdr_valid,
  output logic [6:0] hdr_idx,
  output logic [7:0] hdr_byte,
  output logic       busy,
  output logic       done,
  output logic       crc_ok,
  output logic       hunt_abort
);
  typedef enum logic [1:0] {S_IDLE, S_HUNT, S_LEN, S_DATA} state_e;
  state_e      state;
  logic [7:0]  sh, sh_n;
  logic [2:0]  bitn;
  logic [6:0]  hunt_cnt;
  logic [6:0]  len, idx;
  logic [15:0] crc;

  assign sh_n = {bit_i, sh[7:1]};
  assign busy = (state == S_LEN) || (state == S_DATA);

  crc16 u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .init (state != S_DATA),
    .en   (bit_valid && state == S_DATA),
    .din  (bit_i),
    .crc  (crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sh <= '0; bitn <= '0; hunt_cnt <= '0; len <= '0; idx <= '0;
      fifo_wr <= 1'b0; fifo_wdata <= '0; hdr_valid <= 1'b0; hdr_idx <= '0; hdr_byte <= '0;
      done <= 1'b0; crc_ok <= 1'b0; hunt_abort <= 1'b0;
    end else begin
      fifo_wr <= 1'b0; hdr_valid <= 1'b0; done <= 1'b0; hunt_abort <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_HUNT;
          hunt_cnt <= '0;
          sh       <= '0;
        end
        S_HUNT: if (bit_valid) begin
          sh       <= sh_n;
          hunt_cnt <= hunt_cnt + 1'b1;
          if (sh_n == SFD) begin
            state <= S_LEN;
            bitn  <= '0;
          end else if (32'(hunt_cnt) == HUNT_BITS - 1) begin
            state <= S_IDLE;
            hunt_abort <= 1'b1;
          end
        end
        S_LEN: if (bit_valid) begin
          sh   <= sh_n;
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) begin
            if (32'(sh_n[6:0]) < MIN_LEN) begin
              state <= S_IDLE;
              hunt_abort <= 1'b1;
            end else begin
              state      <= S_DATA;
              len        <= sh_n[6:0];
              idx        <= '0;
              fifo_wr    <= 1'b1;
              fifo_wdata <= sh_n;
            end
          end
        end
        S_DATA: if (bit_valid) begin
          sh   <= sh_n;
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) begin
            fifo_wr    <= 1'b1;
            fifo_wdata <= sh_n;
            hdr_valid  <= 1'b1;
            hdr_idx    <= idx;
            hdr_byte   <= sh_n;
            idx        <= idx + 1'b1;
            if (idx == len - 1'b1) begin
              state  <= S_IDLE;
              done   <= 1'b1;
              // remainder after this last bit
              crc_ok <= ((({1'b0, crc[15:1]}) ^ ((bit_i ^ crc[0]) ? 16'h8408 : 16'h0)) == 16'h0);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
