// server_fsm: server side of the mode-switching handshake.
//
// The handshake has three phases. Initiation: on a trigger the server leaves
// the normal state and sends Start, re-sending it each time its
// re-transmission timer (srv_timeout cycles) fires, until Ack_Start arrives.
// Measurement: it sends N_MEAS short Measurement packets (sequence numbers
// 0..N_MEAS-1) in the current payload modulation, then sends End, again
// re-sent on the timer, until Result_End arrives. Synch: it looks the
// client's good-packet count up in the mode table, switches its own mode at
// once and falls quiet (sends nothing) so that the client's quiescence timer
// can expire. When the client's Synch arrives the server commits the new mode
// as the last common mode, answers with Ack_Synch and returns to normal; in
// the normal state it answers every further Synch with Ack_Synch, but only
// if its last handshake ended this way (so a client whose Synch comes after
// the server gave up is not told the modes agree).
// Interface: `trig` starts a handshake in the normal state; `hs_abort` (a
// rollback) returns to normal at once. Transmit requests use a valid/ready
// pair towards the node's arbiter; `mode_set` pulses with `mode_new`.
// The phases, the quiet period and the server timer follow the original system. The
// retry limit MAX_RETRY, after which the server gives up and returns to
// normal (also bounding the quiet period), is this design's choice.
module server_fsm
  import ms_pkg::*;
#(
  parameter int unsigned N_MEAS     = 2000,
  parameter int unsigned MEAS_LEN   = 32,
  parameter int unsigned ERR_THRESH = 100,
  parameter int unsigned MAX_RETRY  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        trig,
  input  logic        hs_abort,
  input  logic [31:0] srv_timeout,
  input  mod_e        cur_mode,
  // received packets
  input  logic        pkt_valid,
  input  mac_hdr_t    pkt_hdr,
  input  logic        pkt_hdr_ok,
  input  logic        pkt_for_me,
  // transmit requests
  output logic        req_valid,
  output tx_req_t     req,
  input  logic        req_ready,
  // mode control
  output logic        mode_set,
  output mod_e        mode_new,
  output logic        commit,
  // status
  output logic        busy,
  output logic [2:0]  state,
  output logic        ev_resend,
  output logic        ev_giveup,
  output logic [31:0] result
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_MEAS, S_END, S_QUIET} sstate_e;
  sstate_e     st;
  logic        send_pend, ack_pend, synched;
  logic [7:0]  retry;
  logic [15:0] seq;
  logic        t_load, t_stop, t_exp, t_run;
  mod_e        tbl_mode;
  logic        tbl_change;

  wire rx_ok = enable && pkt_valid && pkt_hdr_ok && pkt_for_me;
  wire rx_is = rx_ok;  // qualifier shorthand
  wire pkt_type_e rx_type = pkt_type_e'(pkt_hdr.pkt_type);
  wire accept = req_valid && req_ready;

  hw_timer #(.W(32)) u_retx (
    .clk, .rst_n, .load(t_load), .stop(t_stop), .period(srv_timeout),
    .expired(t_exp), .running(t_run)
  );

  mode_table #(.N_MEAS(N_MEAS), .ERR_THRESH(ERR_THRESH)) u_table (
    .cur_mode(cur_mode), .good_cnt(pkt_hdr.result),
    .new_mode(tbl_mode), .change(tbl_change)
  );

  assign busy  = (st != S_IDLE);
  assign state = st;

  // transmit request
  always_comb begin
    req           = '0;
    req.dst       = BCAST_ADDR;
    req.fullrate  = MOD_BPSK;
    req.resend    = retry;
    req_valid     = 1'b0;
    case (st)
      S_IDLE:  if (ack_pend) begin req_valid = 1'b1; req.ptype = PKT_ACK_SYNCH; req.resend = '0; end
      S_START: if (send_pend) begin req_valid = 1'b1; req.ptype = PKT_START; end
      S_MEAS: begin
        req_valid    = 1'b1;
        req.ptype    = PKT_MEAS;
        req.seq      = seq;
        req.length   = 16'(MEAS_LEN);
        req.fullrate = cur_mode;
        req.resend   = '0;
      end
      S_END:   if (send_pend) begin req_valid = 1'b1; req.ptype = PKT_END; end
      default: ;
    endcase
  end

  always_comb begin
    t_load = 1'b0;
    t_stop = 1'b0;
    if (hs_abort) t_stop = t_run;
    else if (accept && (st == S_START || st == S_END)) t_load = 1'b1;
    else if (rx_is && st == S_END && rx_type == PKT_RESULT_END) t_load = 1'b1;
    else if (rx_is && st == S_START && rx_type == PKT_ACK_START) t_stop = t_run;
    else if (st == S_QUIET && !t_run && !t_exp) t_load = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      send_pend <= 1'b0;
      ack_pend  <= 1'b0;
      synched   <= 1'b0;
      retry     <= '0;
      seq       <= '0;
      mode_set  <= 1'b0;
      mode_new  <= MOD_QPSK;
      commit    <= 1'b0;
      ev_resend <= 1'b0;
      ev_giveup <= 1'b0;
      result    <= '0;
    end else begin
      mode_set  <= 1'b0;
      commit    <= 1'b0;
      ev_resend <= 1'b0;
      ev_giveup <= 1'b0;
      if (accept) send_pend <= 1'b0;
      if (accept && st == S_IDLE) ack_pend <= 1'b0;
      if (hs_abort || !enable) begin
        st        <= S_IDLE;
        send_pend <= 1'b0;
        ack_pend  <= 1'b0;
        synched   <= 1'b0;
      end else begin
        case (st)
          S_IDLE: begin
            if (rx_is && rx_type == PKT_SYNCH && synched) ack_pend <= 1'b1;
            else if (trig) begin
              synched   <= 1'b0;
              ack_pend  <= 1'b0;   // a new handshake supersedes a pending Ack_Synch
              st        <= S_START;
              send_pend <= 1'b1;
              retry     <= '0;
            end
          end
          S_START, S_END: begin
            if (rx_is && st == S_START && rx_type == PKT_ACK_START) begin
              st        <= S_MEAS;
              seq       <= '0;
              retry     <= '0;
              send_pend <= 1'b0;
            end else if (rx_is && st == S_END && rx_type == PKT_RESULT_END) begin
              result    <= pkt_hdr.result;
              mode_set  <= 1'b1;
              mode_new  <= tbl_mode;
              st        <= S_QUIET;
              retry     <= '0;
              send_pend <= 1'b0;
            end else if (t_exp) begin
              if (retry == 8'(MAX_RETRY)) begin
                st        <= S_IDLE;
                ev_giveup <= 1'b1;
              end else begin
                retry     <= retry + 8'd1;
                send_pend <= 1'b1;
                ev_resend <= 1'b1;
              end
            end
          end
          S_MEAS: if (accept) begin
            if (seq == 16'(N_MEAS - 1)) begin
              st        <= S_END;
              send_pend <= 1'b1;
              retry     <= '0;
            end
            seq <= seq + 16'd1;
          end
          S_QUIET: begin
            if (rx_is && rx_type == PKT_SYNCH) begin
              st       <= S_IDLE;
              ack_pend <= 1'b1;
              synched  <= 1'b1;
              commit   <= 1'b1;
            end else if (t_exp) begin
              if (retry == 8'(MAX_RETRY)) begin
                st        <= S_IDLE;
                ev_giveup <= 1'b1;
              end else begin
                retry <= retry + 8'd1;
              end
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  // Handshake rule: a request is held until it is accepted.
  property p_req_hold;
    @(posedge clk) disable iff (!rst_n || hs_abort || !enable)
      (req_valid && !req_ready && st != S_MEAS) |=> req_valid;
  endproperty
  a_req_hold: assert property (p_req_hold);

  wire unused_ok = tbl_change;
endmodule
