// ofdm_link_model: behavioural model of one direction of the wireless link
// (transmitting PHY, air and receiving PHY), for simulation only.
//
// It collects each packet from the sender's transmit stream, decides its
// fate, and replays it into the receiver's receive stream one byte per cycle
// after the last byte has arrived. Headers (BPSK) always arrive intact unless
// the packet is dropped. The payload decodes only if the receiver's PHY mode
// equals the modulation in the packet's Fullrate byte, and then fails with
// probability err_qpsk or err_qam16 (per mille) for that modulation: the
// "interference" knob. `drop_mask` bit t drops every packet of type t, as a
// lost or collided packet would be.
module ofdm_link_model
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        tx_valid,
  input  logic [7:0]  tx_data,
  input  logic        tx_last,
  output logic        tx_ready,
  input  mod_e        rx_mode,
  input  int unsigned err_qpsk,
  input  int unsigned err_qam16,
  input  logic [15:0] drop_mask,
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic        rx_last,
  output logic        rx_payload_ok,
  output int unsigned n_sent,
  output int unsigned n_dropped
);
  byte unsigned cur[$];
  byte unsigned outq[$];
  bit           lastq[$];
  bit           okq[$];

  assign tx_ready = 1'b1;

  initial begin
    n_sent    = 0;
    n_dropped = 0;
    rx_valid  = 1'b0;
    rx_data   = 8'h00;
    rx_last   = 1'b0;
    rx_payload_ok = 1'b0;
  end

  always @(posedge clk) begin
    // replay
    if (outq.size() > 0) begin
      rx_valid      <= 1'b1;
      rx_data       <= outq.pop_front();
      rx_last       <= lastq.pop_front();
      rx_payload_ok <= okq.pop_front();
    end else begin
      rx_valid      <= 1'b0;
      rx_last       <= 1'b0;
      rx_payload_ok <= 1'b0;
    end
    // collect
    if (tx_valid) begin
      cur.push_back(tx_data);
      if (tx_last) begin
        automatic int unsigned ptype = cur.size() > 3 ? 32'(cur[3]) : 0;
        automatic byte unsigned fr = cur[0];
        automatic bit ok;
        automatic int unsigned r = $urandom_range(999, 0);
        n_sent++;
        if (fr == MOD_QPSK)       ok = (rx_mode == MOD_QPSK)  && (r >= err_qpsk);
        else if (fr == MOD_QAM16) ok = (rx_mode == MOD_QAM16) && (r >= err_qam16);
        else                      ok = 1'b1;
        if (ptype < 16 && drop_mask[ptype[3:0]]) begin
          n_dropped++;
        end else begin
          foreach (cur[i]) begin
            outq.push_back(cur[i]);
            lastq.push_back(i == cur.size() - 1);
            okq.push_back(ok);
          end
        end
        cur.delete();
      end
    end
  end
endmodule
