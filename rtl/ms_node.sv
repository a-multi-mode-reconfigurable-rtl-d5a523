// ms_node: one node of the run-time mode-switching OFDM link.
//
// The node sits between a wired (Ethernet) packet port and a SISO-OFDM PHY
// whose payload modulation it selects (`phy_mode`: QPSK or QAM-16; headers
// always go in BPSK). In the normal state it forwards wired packets from the
// loss buffer over the air as Data packets, and it delivers received Data
// payloads to the wired side. Configured as server, the trigger unit
// periodically, or on the manual button, starts the three-phase handshake
// of server_fsm. Configured as client, client_fsm answers it with the error
// rate measured by err_meter. Both ends apply the same mode table, the client
// after its quiescence timer shows the server has switched. During the
// handshake the wired traffic waits in the loss buffer. The rollback unit
// brings both ends back to their last common mode if they end up in
// different modes.
// Transmit arbitration: rollback, then the active handshake FSM, then data,
// one packet at a time through pkt_framer. Data is sent only while no
// handshake or rollback is in progress. The initial mode after reset is QPSK.
// PHY streams move one byte per cycle with valid/ready on transmit and valid
// only on receive; `phy_rx_payload_ok` beside `phy_rx_last` is the PHY's payload
// decode result.
// Building the protocol as hardware state machines (the original system ran it as
// processor software over hardware timers), the stream interfaces, the
// initial mode and the arbitration order are this design's choices.
module ms_node
  import ms_pkg::*;
#(
  parameter int unsigned N_MEAS     = 2000,
  parameter int unsigned MEAS_LEN   = 32,
  parameter int unsigned ERR_THRESH = 100,
  parameter int unsigned MAX_RETRY  = 16,
  parameter int unsigned RB_THRESH  = 8,
  parameter int unsigned BUF_DEPTH  = 2 * 1024 * 1024,
  parameter int unsigned LEN_DEPTH  = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  node_cfg_t   cfg,
  input  logic        trig_enable,
  input  logic        manual_btn,
  // wired side in (no back-pressure)
  input  logic        eth_in_valid,
  input  logic [7:0]  eth_in_data,
  input  logic        eth_in_last,
  // wired side out; eth_out_good beside eth_out_last
  output logic        eth_out_valid,
  output logic [7:0]  eth_out_data,
  output logic        eth_out_last,
  output logic        eth_out_good,
  // PHY transmit
  output logic        phy_tx_valid,
  output logic [7:0]  phy_tx_data,
  output logic        phy_tx_last,
  input  logic        phy_tx_ready,
  // PHY receive
  input  logic        phy_rx_valid,
  input  logic [7:0]  phy_rx_data,
  input  logic        phy_rx_last,
  input  logic        phy_rx_payload_ok,
  // mode control of the OFDM core
  output mod_e        phy_mode,
  output mod_e        common_mode,
  // status and events
  output logic        hs_busy,
  output logic [2:0]  srv_state,
  output logic [2:0]  cli_state,
  output logic [31:0] meas_result,
  output logic [31:0] buf_level,
  output logic [31:0] buf_overflow_cnt,
  output logic        ev_trig,
  output logic [1:0]  ev_trig_src,
  output logic        ev_resend,
  output logic        ev_quiesce,
  output logic        ev_mode_change,
  output logic        ev_rollback,
  output logic        ev_giveup,
  output logic        ev_overflow
);
  // received packet events
  logic     pkt_valid, pkt_hdr_ok, pkt_for_me, pkt_pay_ok;
  mac_hdr_t pkt_hdr;

  // requests
  logic    srv_rv, cli_rv, rb_rv, dat_rv;
  tx_req_t srv_r, cli_r, rb_r, dat_r, f_req;
  logic    f_valid, f_ready;

  logic rb_abort, rb_restore, rb_resume, rb_busy;
  logic srv_busy, cli_busy;
  logic srv_set, cli_set, srv_commit, cli_commit;
  mod_e srv_mode, cli_mode;
  logic [31:0] srv_result, cli_result, m_good, m_bad;
  logic m_clear;
  logic srv_resend, cli_resend, srv_giveup, cli_giveup;
  logic trig;
  logic [1:0] trig_src;
  logic [15:0] rb_tally;

  // loss buffer
  logic        b_avail, b_valid, b_ready;
  logic [7:0]  b_data;
  logic [15:0] b_len, b_pkts;

  wire is_srv = cfg.is_server;
  wire is_cli = !cfg.is_server;

  mode_trigger u_trigger (
    .clk, .rst_n, .enable(trig_enable && is_srv), .auto_en(cfg.auto_en),
    .manual_btn, .resume(rb_resume), .auto_period(cfg.auto_period),
    .manual_period(cfg.manual_period), .trig, .trig_src
  );

  pkt_parser u_parser (
    .clk, .rst_n, .my_addr(cfg.my_addr),
    .rx_valid(phy_rx_valid), .rx_data(phy_rx_data), .rx_last(phy_rx_last),
    .rx_payload_ok(phy_rx_payload_ok),
    .pkt_valid, .pkt_hdr, .pkt_hdr_ok, .pkt_for_me, .pkt_pay_ok,
    .out_valid(eth_out_valid), .out_data(eth_out_data), .out_last(eth_out_last),
    .out_good(eth_out_good)
  );

  server_fsm #(.N_MEAS(N_MEAS), .MEAS_LEN(MEAS_LEN), .ERR_THRESH(ERR_THRESH),
               .MAX_RETRY(MAX_RETRY)) u_server (
    .clk, .rst_n, .enable(is_srv), .trig, .hs_abort(rb_abort),
    .srv_timeout(cfg.srv_timeout), .cur_mode(phy_mode),
    .pkt_valid, .pkt_hdr, .pkt_hdr_ok, .pkt_for_me,
    .req_valid(srv_rv), .req(srv_r), .req_ready(f_ready && srv_rv && !rb_rv),
    .mode_set(srv_set), .mode_new(srv_mode), .commit(srv_commit),
    .busy(srv_busy), .state(srv_state), .ev_resend(srv_resend),
    .ev_giveup(srv_giveup), .result(srv_result)
  );

  err_meter u_meter (
    .clk, .rst_n, .clear(m_clear), .pkt_valid, .pkt_hdr, .pkt_hdr_ok,
    .pkt_pay_ok, .good_cnt(m_good), .bad_cnt(m_bad)
  );

  client_fsm #(.N_MEAS(N_MEAS), .ERR_THRESH(ERR_THRESH), .MAX_RETRY(MAX_RETRY)) u_client (
    .clk, .rst_n, .enable(is_cli), .hs_abort(rb_abort),
    .cli_timeout(cfg.cli_timeout), .quiet_timeout(cfg.quiet_timeout),
    .cur_mode(phy_mode), .pkt_valid, .pkt_hdr, .pkt_hdr_ok, .pkt_for_me,
    .meter_clear(m_clear), .meter_good(m_good),
    .req_valid(cli_rv), .req(cli_r), .req_ready(f_ready && cli_rv && !rb_rv && !srv_rv),
    .mode_set(cli_set), .mode_new(cli_mode), .commit(cli_commit),
    .busy(cli_busy), .state(cli_state), .ev_resend(cli_resend),
    .ev_quiesce, .ev_giveup(cli_giveup), .result(cli_result)
  );

  rollback_unit #(.RB_THRESH(RB_THRESH), .MAX_RETRY(MAX_RETRY)) u_rollback (
    .clk, .rst_n,
    .retry_timeout(is_srv ? cfg.srv_timeout : cfg.cli_timeout),
    .pkt_valid, .pkt_hdr, .pkt_hdr_ok, .pkt_for_me, .pkt_pay_ok,
    .req_valid(rb_rv), .req(rb_r), .req_ready(f_ready && rb_rv),
    .hs_abort(rb_abort), .restore(rb_restore), .resume(rb_resume),
    .busy(rb_busy), .bad_tally(rb_tally), .ev_rollback
  );

  loss_buffer #(.DEPTH(BUF_DEPTH), .LEN_DEPTH(LEN_DEPTH)) u_buffer (
    .clk, .rst_n, .in_valid(eth_in_valid), .in_data(eth_in_data),
    .in_last(eth_in_last), .pkt_avail(b_avail), .head_len(b_len),
    .rd_valid(b_valid), .rd_data(b_data), .rd_ready(b_ready),
    .level(buf_level), .pkt_count(b_pkts), .overflow_cnt(buf_overflow_cnt),
    .ev_overflow
  );

  // data requests: only in the normal state
  assign hs_busy = srv_busy || cli_busy || rb_busy;
  always_comb begin
    dat_r          = '0;
    dat_r.ptype    = PKT_DATA;
    dat_r.dst      = cfg.peer_addr;
    dat_r.length   = b_len;
    dat_r.fullrate = phy_mode;
    dat_rv         = b_avail && !hs_busy;
  end

  // fixed-priority arbiter into the framer
  always_comb begin
    f_valid = 1'b1;
    if (rb_rv)       f_req = rb_r;
    else if (srv_rv) f_req = srv_r;
    else if (cli_rv) f_req = cli_r;
    else begin
      f_req   = dat_r;
      f_valid = dat_rv;
    end
  end

  pkt_framer u_framer (
    .clk, .rst_n, .my_addr(cfg.my_addr),
    .req_valid(f_valid), .req(f_req), .req_ready(f_ready),
    .pay_valid(b_valid), .pay_data(b_data), .pay_ready(b_ready),
    .tx_valid(phy_tx_valid), .tx_data(phy_tx_data), .tx_last(phy_tx_last),
    .tx_ready(phy_tx_ready)
  );

  // mode register (the control that rearranges the OFDM core) and the last
  // mode both ends are known to share
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phy_mode       <= MOD_QPSK;
      common_mode    <= MOD_QPSK;
      ev_mode_change <= 1'b0;
    end else begin
      ev_mode_change <= 1'b0;
      if (rb_restore) begin
        phy_mode       <= common_mode;
        ev_mode_change <= (phy_mode != common_mode);
      end else if (srv_set && is_srv) begin
        phy_mode       <= srv_mode;
        ev_mode_change <= (phy_mode != srv_mode);
      end else if (cli_set && is_cli) begin
        phy_mode       <= cli_mode;
        ev_mode_change <= (phy_mode != cli_mode);
      end
      if ((srv_commit && is_srv) || (cli_commit && is_cli)) common_mode <= phy_mode;
    end
  end

  assign meas_result = is_srv ? srv_result : cli_result;
  assign ev_trig     = trig;
  assign ev_trig_src = trig_src;
  assign ev_resend   = srv_resend || cli_resend;
  assign ev_giveup   = srv_giveup || cli_giveup;

  wire unused_ok = ^{m_bad, rb_tally, b_pkts};
endmodule
