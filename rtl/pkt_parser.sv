// pkt_parser: receive side of the MAC packet format.
//
// Bytes from the PHY are shifted into a 64-byte header register while a
// CRC-16/CCITT runs over bytes 0..61; bytes 62..63 must match it. The header
// is accepted for this node when its destination is the node's own address
// or the all-ones broadcast address that marks protocol packets. Payload
// bytes of an accepted Data packet are forwarded on `out_*`, with `out_good`
// beside `out_last` giving the PHY's payload decode result. One cycle after
// the last byte of every packet, `pkt_valid` pulses with the header and three
// flags: `pkt_hdr_ok` (checksum good and header complete), `pkt_for_me` and
// `pkt_pay_ok` (payload decoded; true for header-only packets). The
// rollback unit uses the case header good, payload bad. A packet that ends
// before 64 bytes is reported with `pkt_hdr_ok` low.
// Address filtering and the broadcast convention follow the original system; the
// stream handshake and the checksum are this design's choices.
module pkt_parser
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] my_addr,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_last,
  input  logic        rx_payload_ok,
  output logic        pkt_valid,
  output mac_hdr_t    pkt_hdr,
  output logic        pkt_hdr_ok,
  output logic        pkt_for_me,
  output logic        pkt_pay_ok,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_last,
  output logic        out_good
);
  mac_hdr_t    hdr_sr;
  logic [15:0] cnt;
  logic [15:0] crc;
  logic        fwd;

  wire in_hdr      = (cnt < 16'(HDR_BYTES));
  wire hdr_last    = (cnt == 16'(HDR_BYTES - 1));
  wire mac_hdr_t nxt_hdr = mac_hdr_t'({hdr_sr[HDR_BITS-9:0], rx_data});
  wire crc_match   = (nxt_hdr.checksum == crc);
  wire addr_match  = (nxt_hdr.dst == BCAST_ADDR) || (nxt_hdr.dst == my_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_sr     <= '0;
      cnt        <= '0;
      crc        <= 16'hFFFF;
      fwd        <= 1'b0;
      pkt_valid  <= 1'b0;
      pkt_hdr    <= '0;
      pkt_hdr_ok <= 1'b0;
      pkt_for_me <= 1'b0;
      pkt_pay_ok <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= 8'h00;
      out_last   <= 1'b0;
      out_good   <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_good  <= 1'b0;
      if (rx_valid) begin
        if (in_hdr) begin
          hdr_sr <= nxt_hdr;
          if (cnt < 16'd62) crc <= crc16_byte(crc, rx_data);
          if (hdr_last) begin
            pkt_hdr    <= nxt_hdr;
            pkt_hdr_ok <= crc_match;
            pkt_for_me <= addr_match;
            fwd        <= crc_match && addr_match && (nxt_hdr.pkt_type == PKT_DATA)
                          && (nxt_hdr.length != 16'd0);
          end
        end else if (fwd) begin
          out_valid <= 1'b1;
          out_data  <= rx_data;
          out_last  <= rx_last;
          out_good  <= rx_last && rx_payload_ok;
        end
        if (rx_last) begin
          pkt_valid <= 1'b1;
          if (in_hdr && !hdr_last) begin
            pkt_hdr_ok <= 1'b0;   // truncated before the header was complete
            pkt_for_me <= 1'b0;
            pkt_hdr    <= nxt_hdr;
          end
          pkt_pay_ok <= (in_hdr && hdr_last) ? 1'b1 : rx_payload_ok;
          cnt <= '0;
          crc <= 16'hFFFF;
          fwd <= 1'b0;
        end else begin
          cnt <= (cnt == 16'hFFFF) ? cnt : cnt + 16'd1;
        end
      end
    end
  end
endmodule
