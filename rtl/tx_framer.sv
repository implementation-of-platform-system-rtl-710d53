// Transmit data MUX and bit MUX. On start it sends, one bit per bit_rd and
// least significant bit first: the preamble (PREAMBLE_BYTES zero octets), the
// SFD, the length byte and length-2 payload octets taken from the Tx FIFO (or,
// with use_ack, from the Tx ACK buffer), and finally the 16-bit FCS that it
// computes over the payload. The source therefore holds the packet from its
// length byte to its last payload octet, as the modem description specifies;
// the FCS is appended here. bit_o/bit_valid present the current bit; the
// consumer pulses bit_rd to take it and the next bit is presented on the
// following clock. done pulses after the last FCS bit has been taken.
// Preamble length and SFD value follow IEEE 802.15.4.
module tx_framer
  import lrwpan_pkg::*;
#(
  parameter int unsigned PRE_BYTES = PREAMBLE_BYTES,
  parameter logic [7:0]  SFD_VAL   = SFD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       use_ack,
  // Tx FIFO (first word fall through)
  input  logic [7:0] fifo_rdata,
  output logic       fifo_rd,
  // Tx ACK buffer
  input  logic [7:0] ack_rdata,
  output logic       ack_rd,
  output logic       ack_rewind,
  // bit stream
  input  logic       bit_rd,
  output logic       bit_o,
  output logic       bit_valid,
  output logic       busy,
  output logic       done
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_SFD, S_LEN, S_PAY, S_FCS} state_e;
  state_e     state;
  logic [7:0] sh;
  logic [3:0] bitn;
  logic [6:0] cnt;      // preamble octet counter / payload octets still to load
  logic [6:0] len;
  logic       src_ack;
  logic [7:0] src;
  logic       byte_end, load;
  logic [15:0] crc;

  assign src       = src_ack ? ack_rdata : fifo_rdata;
  assign busy      = (state != S_IDLE);
  assign bit_valid = busy;
  assign bit_o     = (state == S_FCS) ? crc[0] : sh[0];
  assign byte_end  = bit_rd && busy && (bitn == 4'd7);

  // A new octet is taken from the source at the end of SFD, of the length
  // octet (if there is payload) and of each payload octet but the last.
  always_comb begin
    load = 1'b0;
    if (byte_end) begin
      case (state)
        S_SFD:   load = 1'b1;
        S_LEN:   load = (len > 7'd2);
        S_PAY:   load = (cnt != 0);
        default: load = 1'b0;
      endcase
    end
  end
  assign fifo_rd    = load && !src_ack;
  assign ack_rd     = load && src_ack;
  assign ack_rewind = start && !busy;

  // FCS over the payload octets; during S_FCS the register is shifted out
  // (feeding its own bit 0 back makes the feedback zero, a plain shift).
  crc16 u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .init (start && !busy),
    .en   (bit_rd && (state == S_PAY || state == S_FCS)),
    .din  ((state == S_FCS) ? crc[0] : sh[0]),
    .crc  (crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sh <= '0; bitn <= '0; cnt <= '0; len <= '0;
      src_ack <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        if (start) begin
          state   <= S_PRE;
          src_ack <= use_ack;
          sh      <= '0;
          bitn    <= '0;
          cnt     <= '0;
        end
      end else if (bit_rd) begin
        if (state == S_FCS) begin
          bitn <= bitn + 1'b1;
          if (bitn == 4'd15) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end else if (bitn != 4'd7) begin
          sh   <= {1'b0, sh[7:1]};
          bitn <= bitn + 1'b1;
        end else begin
          bitn <= '0;
          case (state)
            S_PRE: begin
              if (cnt == 7'(PRE_BYTES - 1)) begin
                state <= S_SFD;
                sh    <= SFD_VAL;
              end else begin
                cnt <= cnt + 1'b1;
                sh  <= '0;
              end
            end
            S_SFD: begin
              state <= S_LEN;
              sh    <= src;
              len   <= src[6:0];
            end
            S_LEN: begin
              if (len > 7'd2) begin
                state <= S_PAY;
                sh    <= src;
                cnt   <= len - 7'd3;
              end else begin
                state <= S_FCS;
              end
            end
            S_PAY: begin
              if (cnt == 0) state <= S_FCS;
              else begin
                sh  <= src;
                cnt <= cnt - 1'b1;
              end
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end
endmodule
