// ms_pkg: types and constants shared by the mode-switching node.
//
// Packet types follow the classification table of the MAC header's one-byte
// pktType field (0 Data ... 10 Ack_Rollback). The 64-byte header holds eight
// fields in transmit order: Fullrate, Length, PktType, DstAddr, SrcAddr,
// Resend, Reserved and Checksum. The 6-byte all-ones destination marks protocol
// packets. The widths of Fullrate (1 byte), Length (2 bytes), Resend (1 byte)
// and Checksum (2 bytes, CRC-16/CCITT) are this design's choice; Reserved
// fills the header up to 64 bytes and carries the measurement result in its
// first four bytes and a sequence number in the next two.
package ms_pkg;

  localparam int HDR_BYTES = 64;
  localparam int HDR_BITS  = HDR_BYTES * 8;
  localparam int RSV_BYTES = 45;
  localparam logic [47:0] BCAST_ADDR = 48'hFFFF_FFFF_FFFF;

  typedef enum logic [7:0] {
    PKT_DATA         = 8'd0,
    PKT_ACK          = 8'd1,
    PKT_START        = 8'd2,
    PKT_ACK_START    = 8'd3,
    PKT_MEAS         = 8'd4,
    PKT_END          = 8'd5,
    PKT_RESULT_END   = 8'd6,
    PKT_SYNCH        = 8'd7,
    PKT_ACK_SYNCH    = 8'd8,
    PKT_ROLLBACK     = 8'd9,
    PKT_ACK_ROLLBACK = 8'd10
  } pkt_type_e;

  // Payload modulation, carried in the Fullrate field. BPSK is the base
  // modulation used for headers and for all non-measurement protocol packets.
  typedef enum logic [7:0] {
    MOD_BPSK  = 8'd1,
    MOD_QPSK  = 8'd2,
    MOD_QAM16 = 8'd4
  } mod_e;

  typedef struct packed {
    logic [7:0]   fullrate;
    logic [15:0]  length;     // payload bytes following the header
    logic [7:0]   pkt_type;
    logic [47:0]  dst;
    logic [47:0]  src;
    logic [7:0]   resend;     // number of times this packet was re-sent
    logic [31:0]  result;     // Reserved bytes 0..3: measurement result
    logic [15:0]  seq;        // Reserved bytes 4..5: measurement sequence
    logic [(RSV_BYTES-6)*8-1:0] rsv_pad;
    logic [15:0]  checksum;
  } mac_hdr_t;

  // A transmit request from one of the protocol engines or the data path.
  typedef struct packed {
    pkt_type_e    ptype;
    logic [47:0]  dst;
    logic [7:0]   resend;
    logic [31:0]  result;
    logic [15:0]  seq;
    logic [15:0]  length;
    mod_e         fullrate;
  } tx_req_t;

  // Runtime configuration, the registers software would set.
  typedef struct packed {
    logic         is_server;
    logic         auto_en;        // automatic periodic trigger on
    logic [47:0]  my_addr;
    logic [47:0]  peer_addr;
    logic [31:0]  auto_period;    // cycles between automatic triggers
    logic [31:0]  manual_period;  // shorter expiry loaded by the button
    logic [31:0]  srv_timeout;    // server re-transmission timer
    logic [31:0]  cli_timeout;    // client (shorter) re-transmission timer
    logic [31:0]  quiet_timeout;  // client quiescence timer
  } node_cfg_t;

  // CRC-16/CCITT (polynomial 0x1021), one byte, MSB first.
  function automatic logic [15:0] crc16_byte(input logic [15:0] crc,
                                             input logic [7:0]  data);
    logic [15:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  function automatic mac_hdr_t make_hdr(input tx_req_t r, input logic [47:0] src);
    mac_hdr_t h;
    h.fullrate = r.fullrate;
    h.length   = r.length;
    h.pkt_type = r.ptype;
    h.dst      = r.dst;
    h.src      = src;
    h.resend   = r.resend;
    h.result   = r.result;
    h.seq      = r.seq;
    h.rsv_pad  = '0;
    h.checksum = '0;
    return h;
  endfunction

endpackage
