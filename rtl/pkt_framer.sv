// pkt_framer: turns a transmit request into a byte stream for the OFDM PHY.
//
// A request (type, destination, resend count, result, sequence, length,
// payload modulation) is accepted when `req_ready` is high. The framer then
// sends the 64-byte MAC header, most significant field first, with a
// CRC-16/CCITT over header bytes 0..61 placed in bytes 62..63, followed by
// `length` payload bytes. Measurement packets carry a generated payload
// (byte i = seq[7:0] + i); data packets take theirs from the `pay_*` stream,
// which the loss buffer feeds. `tx_last` marks the final byte. One byte moves
// per cycle in which `tx_valid` and `tx_ready` are both high.
// The header layout follows the original system's packet format; the byte
// widths of the smaller fields, the CRC polynomial and the stream handshake
// are this design's choices.
module pkt_framer
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] my_addr,
  input  logic        req_valid,
  input  tx_req_t     req,
  output logic        req_ready,
  // data payload source
  input  logic        pay_valid,
  input  logic [7:0]  pay_data,
  output logic        pay_ready,
  // PHY transmit stream
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  output logic        tx_last,
  input  logic        tx_ready
);
  typedef enum logic [1:0] {F_IDLE, F_HDR, F_PAY} fstate_e;
  fstate_e     st;
  mac_hdr_t    hdr;
  logic [15:0] idx;
  logic [15:0] crc;
  logic        is_data;

  logic [7:0] hdr_byte;
  always_comb begin
    hdr_byte = hdr[HDR_BITS-1 - 8*idx[5:0] -: 8];
    if (idx[5:0] == 6'd62) hdr_byte = crc[15:8];
    if (idx[5:0] == 6'd63) hdr_byte = crc[7:0];
  end

  assign req_ready = (st == F_IDLE);
  assign pay_ready = (st == F_PAY) && is_data && tx_ready;

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = 8'h00;
    tx_last  = 1'b0;
    case (st)
      F_HDR: begin
        tx_valid = 1'b1;
        tx_data  = hdr_byte;
        tx_last  = (idx == 16'(HDR_BYTES - 1)) && (hdr.length == 16'd0);
      end
      F_PAY: begin
        tx_valid = is_data ? pay_valid : 1'b1;
        tx_data  = is_data ? pay_data : (hdr.seq[7:0] + idx[7:0]);
        tx_last  = (idx == hdr.length - 16'd1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= F_IDLE;
      hdr     <= '0;
      idx     <= '0;
      crc     <= 16'hFFFF;
      is_data <= 1'b0;
    end else begin
      case (st)
        F_IDLE: if (req_valid) begin
          hdr     <= make_hdr(req, my_addr);
          is_data <= (req.ptype == PKT_DATA);
          idx     <= '0;
          crc     <= 16'hFFFF;
          st      <= F_HDR;
        end
        F_HDR: if (tx_ready) begin
          if (idx < 16'd62) crc <= crc16_byte(crc, hdr_byte);
          if (idx == 16'(HDR_BYTES - 1)) begin
            idx <= '0;
            st  <= (hdr.length == 16'd0) ? F_IDLE : F_PAY;
          end else begin
            idx <= idx + 16'd1;
          end
        end
        F_PAY: if (tx_valid && tx_ready) begin
          if (tx_last) st <= F_IDLE;
          idx <= idx + 16'd1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
