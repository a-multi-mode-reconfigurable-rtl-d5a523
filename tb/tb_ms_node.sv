// tb_ms_node: end-to-end test of two ms_node instances, a server and a
// client, joined by two ofdm_link_model directions.
//
// Wired traffic (numbered packets whose bytes follow from their number) goes
// into the server and is checked at the client's wired output: every packet
// delivered as good must be intact and newer than the one before. The test
// walks through five phases:
//   A  manual trigger on a clean link, first Start and Ack_Start lost:
//      re-transmission on both timers, quiescence, QPSK -> QAM-16, and no
//      wired packet lost while the buffer holds traffic during the switch
//   B  interference on QAM-16, automatic trigger: QAM-16 -> QPSK
//   C  End and Result_End lost so only the client switches: both give up,
//      data fails to decode, rollback to the common mode, resumed handshake
//   D  a burst of wired traffic during a handshake: buffer overflow
// Each mechanism is counted and must have happened at least once. Sizes are
// reduced (50 measurement packets, 4 KiB buffer, 64 packet lengths) to keep the run short.
module tb_ms_node;
  import ms_pkg::*;

  localparam int N_MEAS    = 50;
  localparam int MEAS_LEN  = 16;
  localparam int ERR_THR   = 5;
  localparam int MAX_RETRY = 4;
  localparam int RB_THR    = 8;
  localparam int BUF_DEPTH = 4096;
  localparam int LEN_DEPTH = 64;
  localparam int PKT_LEN   = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------------------------------------------------------- nodes
  node_cfg_t s_cfg, c_cfg;
  logic s_trig_en, s_btn, c_trig_en, c_btn;
  logic s_ein_v, s_ein_l, c_ein_v, c_ein_l;
  logic [7:0] s_ein_d, c_ein_d;
  logic s_eo_v, s_eo_l, s_eo_g, c_eo_v, c_eo_l, c_eo_g;
  logic [7:0] s_eo_d, c_eo_d;
  logic s_tx_v, s_tx_l, s_tx_r, c_tx_v, c_tx_l, c_tx_r;
  logic [7:0] s_tx_d, c_tx_d;
  logic s_rx_v, s_rx_l, s_rx_ok, c_rx_v, c_rx_l, c_rx_ok;
  logic [7:0] s_rx_d, c_rx_d;
  mod_e s_mode, c_mode, s_common, c_common;
  logic s_busy, c_busy;
  logic [2:0] s_sst, s_cst, c_sst, c_cst;
  logic [31:0] s_res, c_res, s_lvl, c_lvl, s_ovf, c_ovf;
  logic s_trig, c_trig, s_resend, c_resend, s_quies, c_quies, s_mchg, c_mchg;
  logic s_rb, c_rb, s_gu, c_gu, s_eovf, c_eovf;
  logic [1:0] s_tsrc, c_tsrc;

  int unsigned err_qpsk = 0, err_qam16 = 0;
  logic [15:0] drop_s2c = '0, drop_c2s = '0;
  int unsigned s2c_sent, s2c_drop, c2s_sent, c2s_drop;

  ms_node #(.N_MEAS(N_MEAS), .MEAS_LEN(MEAS_LEN), .ERR_THRESH(ERR_THR),
            .MAX_RETRY(MAX_RETRY), .RB_THRESH(RB_THR), .BUF_DEPTH(BUF_DEPTH),
            .LEN_DEPTH(LEN_DEPTH)) u_srv (
    .clk, .rst_n, .cfg(s_cfg), .trig_enable(s_trig_en), .manual_btn(s_btn),
    .eth_in_valid(s_ein_v), .eth_in_data(s_ein_d), .eth_in_last(s_ein_l),
    .eth_out_valid(s_eo_v), .eth_out_data(s_eo_d), .eth_out_last(s_eo_l), .eth_out_good(s_eo_g),
    .phy_tx_valid(s_tx_v), .phy_tx_data(s_tx_d), .phy_tx_last(s_tx_l), .phy_tx_ready(s_tx_r),
    .phy_rx_valid(s_rx_v), .phy_rx_data(s_rx_d), .phy_rx_last(s_rx_l), .phy_rx_payload_ok(s_rx_ok),
    .phy_mode(s_mode), .common_mode(s_common), .hs_busy(s_busy),
    .srv_state(s_sst), .cli_state(s_cst), .meas_result(s_res), .buf_level(s_lvl),
    .buf_overflow_cnt(s_ovf), .ev_trig(s_trig), .ev_trig_src(s_tsrc), .ev_resend(s_resend),
    .ev_quiesce(s_quies), .ev_mode_change(s_mchg), .ev_rollback(s_rb), .ev_giveup(s_gu),
    .ev_overflow(s_eovf)
  );

  ms_node #(.N_MEAS(N_MEAS), .MEAS_LEN(MEAS_LEN), .ERR_THRESH(ERR_THR),
            .MAX_RETRY(MAX_RETRY), .RB_THRESH(RB_THR), .BUF_DEPTH(BUF_DEPTH),
            .LEN_DEPTH(LEN_DEPTH)) u_cli (
    .clk, .rst_n, .cfg(c_cfg), .trig_enable(c_trig_en), .manual_btn(c_btn),
    .eth_in_valid(c_ein_v), .eth_in_data(c_ein_d), .eth_in_last(c_ein_l),
    .eth_out_valid(c_eo_v), .eth_out_data(c_eo_d), .eth_out_last(c_eo_l), .eth_out_good(c_eo_g),
    .phy_tx_valid(c_tx_v), .phy_tx_data(c_tx_d), .phy_tx_last(c_tx_l), .phy_tx_ready(c_tx_r),
    .phy_rx_valid(c_rx_v), .phy_rx_data(c_rx_d), .phy_rx_last(c_rx_l), .phy_rx_payload_ok(c_rx_ok),
    .phy_mode(c_mode), .common_mode(c_common), .hs_busy(c_busy),
    .srv_state(c_sst), .cli_state(c_cst), .meas_result(c_res), .buf_level(c_lvl),
    .buf_overflow_cnt(c_ovf), .ev_trig(c_trig), .ev_trig_src(c_tsrc), .ev_resend(c_resend),
    .ev_quiesce(c_quies), .ev_mode_change(c_mchg), .ev_rollback(c_rb), .ev_giveup(c_gu),
    .ev_overflow(c_eovf)
  );

  ofdm_link_model u_s2c (
    .clk, .tx_valid(s_tx_v), .tx_data(s_tx_d), .tx_last(s_tx_l), .tx_ready(s_tx_r),
    .rx_mode(c_mode), .err_qpsk, .err_qam16, .drop_mask(drop_s2c),
    .rx_valid(c_rx_v), .rx_data(c_rx_d), .rx_last(c_rx_l), .rx_payload_ok(c_rx_ok),
    .n_sent(s2c_sent), .n_dropped(s2c_drop)
  );
  ofdm_link_model u_c2s (
    .clk, .tx_valid(c_tx_v), .tx_data(c_tx_d), .tx_last(c_tx_l), .tx_ready(c_tx_r),
    .rx_mode(s_mode), .err_qpsk, .err_qam16, .drop_mask(drop_c2s),
    .rx_valid(s_rx_v), .rx_data(s_rx_d), .rx_last(s_rx_l), .rx_payload_ok(s_rx_ok),
    .n_sent(c2s_sent), .n_dropped(c2s_drop)
  );

  // ------------------------------------------------------- event counters
  int n_manual = 0, n_auto = 0, n_resume = 0, n_srv_resend = 0, n_cli_resend = 0;
  int n_quiesce = 0, n_up = 0, n_down = 0, n_rollback = 0, n_giveup = 0;
  int n_overflow = 0, n_buffered = 0, n_meas_tx = 0, n_meas_phase = 0;
  logic [2:0] s_sst_q = '0;
  int tx_byte = 0;

  always @(posedge clk) if (rst_n) begin
    if (s_trig && s_tsrc == 2'd1) n_manual++;
    if (s_trig && s_tsrc == 2'd0) n_auto++;
    if (s_trig && s_tsrc == 2'd2) n_resume++;
    if (s_resend) n_srv_resend++;
    if (c_resend) n_cli_resend++;
    if (c_quies)  n_quiesce++;
    if (s_mchg && s_mode == MOD_QAM16) n_up++;
    if (s_mchg && s_mode == MOD_QPSK)  n_down++;
    if (s_rb || c_rb) n_rollback++;
    if (s_gu || c_gu) n_giveup++;
    if (s_eovf) n_overflow++;
    if (s_busy && s_lvl != 0 && s_ein_v && s_ein_l) n_buffered++;
    s_sst_q <= s_sst;
    if (s_sst == 3'd2 && s_sst_q != 3'd2) n_meas_phase++;
    // count measurement packets the server puts on the air (byte 3 = type)
    if (s_tx_v && s_tx_r) begin
      if (tx_byte == 3 && s_tx_d == 8'(PKT_MEAS)) n_meas_tx++;
      tx_byte = s_tx_l ? 0 : tx_byte + 1;
    end
  end

  // -------------------------------------------------- wired traffic source
  int next_id = 1;
  bit traffic_on = 0;
  int traffic_gap = 400;
  int burst_len = PKT_LEN;

  function automatic byte unsigned pkt_byte(int id, int i);
    if (i == 0) return 8'(id >> 8);
    if (i == 1) return 8'(id);
    return 8'(id * 7 + i);
  endfunction

  task automatic send_pkt(int len);
    for (int i = 0; i < len; i++) begin
      s_ein_v <= 1'b1;
      s_ein_d <= pkt_byte(next_id, i);
      s_ein_l <= (i == len - 1);
      @(posedge clk);
    end
    s_ein_v <= 1'b0;
    s_ein_l <= 1'b0;
    next_id++;
  endtask

  initial begin
    s_ein_v = 0; s_ein_d = 0; s_ein_l = 0;
    c_ein_v = 0; c_ein_d = 0; c_ein_l = 0;
    forever begin
      @(posedge clk);
      if (traffic_on) begin
        send_pkt(burst_len);
        repeat (traffic_gap) @(posedge clk);
      end
    end
  end

  // ---------------------------------------------- wired output scoreboard
  byte unsigned rxb[$];
  int last_id = 0, delivered = 0, delivered_bad = 0;
  always @(posedge clk) if (rst_n && c_eo_v) begin
    rxb.push_back(c_eo_d);
    if (c_eo_l) begin
      if (c_eo_g) begin
        automatic int id = {rxb[0], rxb[1]};
        automatic bit ok = (id > last_id);
        foreach (rxb[i]) if (rxb[i] != pkt_byte(id, i)) ok = 0;
        check(ok, $sformatf("delivered packet %0d corrupt or out of order", id));
        last_id = id;
        delivered++;
      end else begin
        delivered_bad++;
      end
      rxb.delete();
    end
  end
  // the client sends no wired traffic, so the server must deliver nothing
  always @(posedge clk) if (rst_n && s_eo_v) check(0, "server delivered an unexpected packet");

  task automatic wait_idle();
    wait (!s_busy && !c_busy);
    repeat (10) @(posedge clk);
    wait (!s_busy && !c_busy);
  endtask

  task automatic press();
    s_btn <= 1'b1;
    repeat (3) @(posedge clk);
    s_btn <= 1'b0;
  endtask

  // -------------------------------------------------------------- watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- stimulus
  int sent_before, phase_a_sent;
  initial begin
    s_cfg = '{is_server: 1'b1, auto_en: 1'b0, my_addr: 48'h0000_0000_0A01,
              peer_addr: 48'h0000_0000_0B02, auto_period: 32'd40000,
              manual_period: 32'd100, srv_timeout: 32'd1500,
              cli_timeout: 32'd400, quiet_timeout: 32'd2500};
    c_cfg = s_cfg;
    c_cfg.is_server = 1'b0;
    c_cfg.my_addr   = 48'h0000_0000_0B02;
    c_cfg.peer_addr = 48'h0000_0000_0A01;
    s_trig_en = 1'b1; c_trig_en = 1'b1; s_btn = 1'b0; c_btn = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    check(s_mode == MOD_QPSK && c_mode == MOD_QPSK, "both nodes start in QPSK");

    // ---- phase A
    traffic_on = 1;
    repeat (2000) @(posedge clk);
    drop_s2c[PKT_START] = 1'b1;
    drop_c2s[PKT_ACK_START] = 1'b1;
    press();
    wait (n_srv_resend >= 1);
    drop_s2c[PKT_START] = 1'b0;
    wait (n_cli_resend >= 1);
    drop_c2s[PKT_ACK_START] = 1'b0;
    wait_idle();
    check(s_mode == MOD_QAM16 && c_mode == MOD_QAM16, "phase A: both nodes in QAM-16");
    check(s_common == MOD_QAM16 && c_common == MOD_QAM16, "phase A: common mode QAM-16");
    check(c_res == N_MEAS && s_res == N_MEAS, "phase A: clean link counts every measurement packet");
    check(n_manual == 1, "phase A: manual trigger");
    traffic_on = 0;
    repeat (3000) @(posedge clk);
    wait (s_lvl == 0);
    repeat (1000) @(posedge clk);
    phase_a_sent = next_id - 1;
    check(delivered == phase_a_sent && delivered_bad == 0,
          $sformatf("phase A: %0d of %0d wired packets delivered", delivered, phase_a_sent));
    check(n_meas_tx == N_MEAS * n_meas_phase, "phase A: N_MEAS measurement packets per handshake");
    check(s_ovf == 0, "phase A: no buffer overflow");

    // ---- phase B: interference on QAM-16, automatic trigger
    err_qam16 = 300;
    traffic_on = 1;
    s_cfg.auto_en = 1'b1;
    wait (n_auto >= 1);
    s_cfg.auto_en = 1'b0;
    wait_idle();
    check(s_mode == MOD_QPSK && c_mode == MOD_QPSK, "phase B: both nodes back in QPSK");
    check(c_res < N_MEAS - ERR_THR, "phase B: measured errors above threshold");
    err_qam16 = 0;
    repeat (5000) @(posedge clk);

    // ---- phase C: only the client switches, rollback recovers
    drop_s2c[PKT_END] = 1'b0;
    fork
      begin
        wait (c_cst == 3'd3);            // client sent Result_End
        drop_s2c[PKT_END] = 1'b1;
        drop_c2s[PKT_RESULT_END] = 1'b1;
        wait (n_quiesce >= 3);
        drop_s2c[PKT_END] = 1'b0;
        drop_c2s[PKT_RESULT_END] = 1'b0;
      end
      press();
    join
    check(c_mode == MOD_QAM16 && s_mode == MOD_QPSK, "phase C: nodes out of step");
    wait (n_rollback >= 1);
    wait (n_resume >= 1);
    wait_idle();
    check(s_mode == c_mode, "phase C: modes agree after rollback and resumed handshake");
    check(s_mode == MOD_QAM16, "phase C: resumed handshake reaches QAM-16");
    check(s_common == c_common, "phase C: common modes agree");

    // ---- phase D: overflow of the loss buffer during a handshake
    traffic_on = 0;
    wait (s_lvl == 0);
    repeat (500) @(posedge clk);
    press();
    wait (s_busy);
    burst_len = 200;
    traffic_gap = 0;
    traffic_on = 1;
    repeat (9000) @(posedge clk);
    traffic_on = 0;
    wait_idle();
    check(s_ovf > 0, "phase D: buffer overflow counted");
    wait (s_lvl == 0);
    repeat (2000) @(posedge clk);

    // ---- mechanisms
    check(n_manual >= 1,     $sformatf("manual trigger x%0d", n_manual));
    check(n_auto >= 1,       $sformatf("automatic trigger x%0d", n_auto));
    check(n_resume >= 1,     $sformatf("resumed handshake x%0d", n_resume));
    check(n_srv_resend >= 1, $sformatf("server re-transmission x%0d", n_srv_resend));
    check(n_cli_resend >= 1, $sformatf("client re-transmission x%0d", n_cli_resend));
    check(n_quiesce >= 1,    $sformatf("quiescence detected x%0d", n_quiesce));
    check(n_up >= 1,         $sformatf("switch QPSK->QAM-16 x%0d", n_up));
    check(n_down >= 1,       $sformatf("switch QAM-16->QPSK x%0d", n_down));
    check(n_rollback >= 1,   $sformatf("rollback x%0d", n_rollback));
    check(n_giveup >= 1,     $sformatf("retry limit reached x%0d", n_giveup));
    check(n_overflow >= 1,   $sformatf("buffer overflow x%0d", n_overflow));
    check(n_buffered >= 1,   $sformatf("packets buffered during handshake x%0d", n_buffered));
    check(delivered > 0,     $sformatf("%0d wired packets delivered", delivered));
    $display("mechanisms: manual=%0d auto=%0d resume=%0d srv_resend=%0d cli_resend=%0d quiesce=%0d up=%0d down=%0d rollback=%0d giveup=%0d overflow=%0d buffered=%0d delivered=%0d/%0d cycles=%0d",
             n_manual, n_auto, n_resume, n_srv_resend, n_cli_resend, n_quiesce, n_up, n_down,
             n_rollback, n_giveup, n_overflow, n_buffered, delivered, next_id - 1, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
