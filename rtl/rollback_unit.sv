// rollback_unit: recovers two nodes that ended a handshake in different modes.
//
// Headers always travel in base modulation (BPSK), so a node can still read
// the source address of a packet whose payload it cannot decode. This unit
// tallies, for the source of the last such packet, the packets that carry a
// payload (measurement packets excepted) whose header is good but whose
// payload fails. A packet from that source that decodes resets the tally, and
// so does a failing packet from a different source. When the tally exceeds
// RB_THRESH the modes are taken to be out of step: the unit aborts any
// handshake, sends Rollback to that source in base modulation, re-sent on
// the retry timer until Ack_Rollback comes back (at most MAX_RETRY
// re-sends), then pulses `restore` and `resume`. A node that receives
// Rollback aborts its handshake, answers with one Ack_Rollback, and pulses
// `restore` and `resume` too. `restore` returns the node to its last common
// mode; `resume` restarts the handshake on the server.
// The tally, the threshold test and the Rollback/Ack_Rollback exchange follow
// the original system. The threshold value, the reset-on-success rule and the retry
// limit are this design's choices.
module rollback_unit
  import ms_pkg::*;
#(
  parameter int unsigned RB_THRESH = 8,
  parameter int unsigned MAX_RETRY = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] retry_timeout,
  input  logic        pkt_valid,
  input  mac_hdr_t    pkt_hdr,
  input  logic        pkt_hdr_ok,
  input  logic        pkt_for_me,
  input  logic        pkt_pay_ok,
  output logic        req_valid,
  output tx_req_t     req,
  input  logic        req_ready,
  output logic        hs_abort,
  output logic        restore,
  output logic        resume,
  output logic        busy,
  output logic [15:0] bad_tally,
  output logic        ev_rollback
);
  typedef enum logic [1:0] {R_IDLE, R_SEND, R_WAIT} rstate_e;
  rstate_e     st;
  logic [47:0] bad_src;
  logic [47:0] peer;
  logic [7:0]  retry;
  logic        ack_pend;
  logic [47:0] ack_dst;
  logic        t_load, t_stop, t_exp, t_run;

  wire rx_is     = pkt_valid && pkt_hdr_ok && pkt_for_me;
  wire pkt_type_e rx_type = pkt_type_e'(pkt_hdr.pkt_type);
  wire has_pay   = (pkt_hdr.length != 16'd0) && (rx_type != PKT_MEAS);
  wire rx_rb     = rx_is && rx_type == PKT_ROLLBACK;
  wire rx_ackrb  = rx_is && rx_type == PKT_ACK_ROLLBACK && pkt_hdr.src == peer;
  wire bad_pkt   = rx_is && has_pay && !pkt_pay_ok;
  wire good_pkt  = rx_is && has_pay && pkt_pay_ok;
  wire accept    = req_valid && req_ready;
  wire trip      = (st == R_IDLE) && bad_pkt && (pkt_hdr.src == bad_src)
                   && (bad_tally >= 16'(RB_THRESH));

  hw_timer #(.W(32)) u_retry (
    .clk, .rst_n, .load(t_load), .stop(t_stop), .period(retry_timeout),
    .expired(t_exp), .running(t_run)
  );

  assign busy = (st != R_IDLE);

  always_comb begin
    req          = '0;
    req.fullrate = MOD_BPSK;
    req.resend   = retry;
    req_valid    = 1'b0;
    if (ack_pend) begin
      req_valid  = 1'b1;
      req.ptype  = PKT_ACK_ROLLBACK;
      req.dst    = ack_dst;
      req.resend = '0;
    end else if (st == R_SEND) begin
      req_valid  = 1'b1;
      req.ptype  = PKT_ROLLBACK;
      req.dst    = peer;
    end
  end

  always_comb begin
    t_load = accept && !ack_pend && (st == R_SEND);
    t_stop = rx_ackrb && t_run;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_IDLE;
      bad_src     <= '0;
      peer        <= '0;
      bad_tally   <= '0;
      retry       <= '0;
      ack_pend    <= 1'b0;
      ack_dst     <= '0;
      hs_abort    <= 1'b0;
      restore     <= 1'b0;
      resume      <= 1'b0;
      ev_rollback <= 1'b0;
    end else begin
      hs_abort    <= 1'b0;
      restore     <= 1'b0;
      resume      <= 1'b0;
      ev_rollback <= 1'b0;
      if (accept && ack_pend) ack_pend <= 1'b0;

      // tally of undecodable packets per source
      if (bad_pkt) begin
        if (pkt_hdr.src == bad_src) begin
          if (bad_tally != 16'hFFFF) bad_tally <= bad_tally + 16'd1;
        end else begin
          bad_src   <= pkt_hdr.src;
          bad_tally <= 16'd1;
        end
      end else if (good_pkt && pkt_hdr.src == bad_src) begin
        bad_tally <= '0;
      end

      if (rx_rb) begin
        // peer asks for a rollback: acknowledge and recover
        ack_pend    <= 1'b1;
        ack_dst     <= pkt_hdr.src;
        hs_abort    <= 1'b1;
        restore     <= 1'b1;
        resume      <= 1'b1;
        bad_tally   <= '0;
        ev_rollback <= (st == R_IDLE);
        if (st != R_IDLE) st <= R_IDLE;
      end else begin
        case (st)
          R_IDLE: if (trip) begin
            st          <= R_SEND;
            peer        <= pkt_hdr.src;
            retry       <= '0;
            hs_abort    <= 1'b1;
            ev_rollback <= 1'b1;
          end
          R_SEND: if (accept && !ack_pend) st <= R_WAIT;
          R_WAIT: begin
            if (rx_ackrb) begin
              st        <= R_IDLE;
              restore   <= 1'b1;
              resume    <= 1'b1;
              bad_tally <= '0;
            end else if (t_exp) begin
              if (retry == 8'(MAX_RETRY)) begin
                st        <= R_IDLE;
                bad_tally <= '0;
              end else begin
                retry <= retry + 8'd1;
                st    <= R_SEND;
              end
            end
          end
          default: st <= R_IDLE;
        endcase
      end
    end
  end
endmodule
