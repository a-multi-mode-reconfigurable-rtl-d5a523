// client_fsm: client side of the mode-switching handshake.
//
// A Start from the server moves the client from the normal state into the
// mode-switching state. It clears the error-rate meter and answers with
// Ack_Start, re-sent on its own short timer (cli_timeout, shorter than the
// server's) and once more for every further Start, until the first
// Measurement or End packet shows the server has moved on. On the first End
// it freezes the meter's good-packet count and sends it in Result_End, again
// re-sent on the short timer. At the same time it starts the quiescence timer
// and restarts it whenever another End arrives. When the quiescence timer
// expires no End has come for quiet_timeout cycles, so the server has already
// switched. The client then applies the same mode table and sends Synch on
// the short timer until Ack_Synch returns. It then commits the mode as the
// last common mode and goes back to normal.
// The two-timer re-transmission and the quiescence scheme follow the
// document. The retry limit on Ack_Start and Synch, and the inactivity
// timeout (the quiescence timer, restarted on every Measurement packet) that
// returns the client to normal if the server stops during measurement, are
// this design's choices.
module client_fsm
  import ms_pkg::*;
#(
  parameter int unsigned N_MEAS     = 2000,
  parameter int unsigned ERR_THRESH = 100,
  parameter int unsigned MAX_RETRY  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        hs_abort,
  input  logic [31:0] cli_timeout,
  input  logic [31:0] quiet_timeout,
  input  mod_e        cur_mode,
  input  logic        pkt_valid,
  input  mac_hdr_t    pkt_hdr,
  input  logic        pkt_hdr_ok,
  input  logic        pkt_for_me,
  // error-rate meter
  output logic        meter_clear,
  input  logic [31:0] meter_good,
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
  output logic        ev_quiesce,
  output logic        ev_giveup,
  output logic [31:0] result
);
  typedef enum logic [2:0] {C_IDLE, C_ACKSTART, C_MEAS, C_RESULT, C_SYNCH} cstate_e;
  cstate_e    st;
  logic       send_pend;
  logic [7:0] retry;
  logic       s_load, s_stop, s_exp, s_run;
  logic       q_load, q_stop, q_exp, q_run;
  mod_e       tbl_mode;
  logic       tbl_change;

  wire rx_is = enable && pkt_valid && pkt_hdr_ok && pkt_for_me;
  wire pkt_type_e rx_type = pkt_type_e'(pkt_hdr.pkt_type);
  wire accept   = req_valid && req_ready;
  wire rx_start = rx_is && rx_type == PKT_START;
  wire rx_meas  = rx_is && rx_type == PKT_MEAS;
  wire rx_end   = rx_is && rx_type == PKT_END;
  wire rx_asyn  = rx_is && rx_type == PKT_ACK_SYNCH;

  hw_timer #(.W(32)) u_short (
    .clk, .rst_n, .load(s_load), .stop(s_stop), .period(cli_timeout),
    .expired(s_exp), .running(s_run)
  );
  hw_timer #(.W(32)) u_quiet (
    .clk, .rst_n, .load(q_load), .stop(q_stop), .period(quiet_timeout),
    .expired(q_exp), .running(q_run)
  );

  mode_table #(.N_MEAS(N_MEAS), .ERR_THRESH(ERR_THRESH)) u_table (
    .cur_mode(cur_mode), .good_cnt(result),
    .new_mode(tbl_mode), .change(tbl_change)
  );

  assign busy  = (st != C_IDLE);
  assign state = st;
  assign meter_clear = (st == C_IDLE) && rx_start && !hs_abort;

  always_comb begin
    req          = '0;
    req.dst      = BCAST_ADDR;
    req.fullrate = MOD_BPSK;
    req.resend   = retry;
    req_valid    = 1'b0;
    case (st)
      C_ACKSTART: if (send_pend) begin req_valid = 1'b1; req.ptype = PKT_ACK_START; end
      C_RESULT:   if (send_pend) begin req_valid = 1'b1; req.ptype = PKT_RESULT_END; req.result = result; end
      C_SYNCH:    if (send_pend) begin req_valid = 1'b1; req.ptype = PKT_SYNCH; end
      default: ;
    endcase
  end

  // short (acknowledgement) timer: restarted after every send
  always_comb begin
    s_load = 1'b0;
    s_stop = 1'b0;
    q_load = 1'b0;
    q_stop = 1'b0;
    if (hs_abort || !enable) begin
      s_stop = s_run;
      q_stop = q_run;
    end else begin
      if (accept) s_load = 1'b1;
      else if (st == C_ACKSTART && (rx_meas || rx_end)) s_stop = s_run;
      if (st == C_ACKSTART && rx_meas) q_load = 1'b1;
      else if (st == C_MEAS && rx_meas) q_load = 1'b1;
      else if ((st == C_ACKSTART || st == C_MEAS || st == C_RESULT) && rx_end) q_load = 1'b1;
      else if (st == C_RESULT && q_exp) s_stop = s_run;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      send_pend  <= 1'b0;
      retry      <= '0;
      mode_set   <= 1'b0;
      mode_new   <= MOD_QPSK;
      commit     <= 1'b0;
      ev_resend  <= 1'b0;
      ev_quiesce <= 1'b0;
      ev_giveup  <= 1'b0;
      result     <= '0;
    end else begin
      mode_set   <= 1'b0;
      commit     <= 1'b0;
      ev_resend  <= 1'b0;
      ev_quiesce <= 1'b0;
      ev_giveup  <= 1'b0;
      if (accept) send_pend <= 1'b0;
      if (hs_abort || !enable) begin
        st        <= C_IDLE;
        send_pend <= 1'b0;
      end else begin
        case (st)
          C_IDLE: if (rx_start) begin
            st        <= C_ACKSTART;
            send_pend <= 1'b1;
            retry     <= '0;
          end
          C_ACKSTART: begin
            if (rx_end) begin
              result    <= meter_good;
              st        <= C_RESULT;
              send_pend <= 1'b1;
              retry     <= '0;
            end else if (rx_meas) begin
              st <= C_MEAS;
            end else if (rx_start) begin
              send_pend <= 1'b1;
            end else if (s_exp) begin
              if (retry == 8'(MAX_RETRY)) begin
                st        <= C_IDLE;
                ev_giveup <= 1'b1;
              end else begin
                retry     <= retry + 8'd1;
                send_pend <= 1'b1;
                ev_resend <= 1'b1;
              end
            end
          end
          C_MEAS: begin
            if (rx_end) begin
              result    <= meter_good;
              st        <= C_RESULT;
              send_pend <= 1'b1;
              retry     <= '0;
            end else if (q_exp) begin
              st        <= C_IDLE;
              ev_giveup <= 1'b1;
            end
          end
          C_RESULT: begin
            if (q_exp) begin
              mode_set   <= 1'b1;
              mode_new   <= tbl_mode;
              ev_quiesce <= 1'b1;
              st         <= C_SYNCH;
              send_pend  <= 1'b1;
              retry      <= '0;
            end else if (s_exp) begin
              retry     <= retry + 8'd1;
              send_pend <= 1'b1;
              ev_resend <= 1'b1;
            end
          end
          C_SYNCH: begin
            if (rx_asyn) begin
              st        <= C_IDLE;
              commit    <= 1'b1;
              send_pend <= 1'b0;
            end else if (s_exp) begin
              if (retry == 8'(MAX_RETRY)) begin
                st        <= C_IDLE;
                ev_giveup <= 1'b1;
              end else begin
                retry     <= retry + 8'd1;
                send_pend <= 1'b1;
                ev_resend <= 1'b1;
              end
            end
          end
          default: st <= C_IDLE;
        endcase
      end
    end
  end

  property p_req_hold;
    @(posedge clk) disable iff (!rst_n || hs_abort || !enable)
      (req_valid && !req_ready) |=> req_valid;
  endproperty
  a_req_hold: assert property (p_req_hold);

  wire unused_ok = tbl_change;
endmodule
