// err_meter: client-side transmission error rate measurement.
//
// The software method of measurement: the server sends a fixed number of
// short measurement packets and the client counts those that arrive intact
// (header checksum good and payload decoded). `clear` starts a new
// measurement; each `pkt_valid` of a Measurement packet with both flags good
// adds one to `good_cnt`. A measurement packet whose sequence number was
// already counted (a duplicate) is not counted again: `seen_seq` remembers
// the highest sequence number counted. The count is what the client returns
// in its Result_End packet. Duplicate suppression is this design's choice.
module err_meter
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        pkt_valid,
  input  mac_hdr_t    pkt_hdr,
  input  logic        pkt_hdr_ok,
  input  logic        pkt_pay_ok,
  output logic [31:0] good_cnt,
  output logic [31:0] bad_cnt
);
  logic        any_seen;
  logic [15:0] seen_seq;

  wire is_meas = pkt_valid && pkt_hdr_ok && (pkt_hdr.pkt_type == PKT_MEAS);
  wire is_new  = !any_seen || (pkt_hdr.seq > seen_seq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      good_cnt <= '0;
      bad_cnt  <= '0;
      any_seen <= 1'b0;
      seen_seq <= '0;
    end else if (clear) begin
      good_cnt <= '0;
      bad_cnt  <= '0;
      any_seen <= 1'b0;
      seen_seq <= '0;
    end else if (is_meas && is_new) begin
      any_seen <= 1'b1;
      seen_seq <= pkt_hdr.seq;
      if (pkt_pay_ok) good_cnt <= good_cnt + 32'd1;
      else            bad_cnt  <= bad_cnt + 32'd1;
    end
  end
endmodule
