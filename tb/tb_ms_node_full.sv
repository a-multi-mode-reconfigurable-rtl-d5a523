// tb_ms_node_full: one complete mode switch of a server and a client node at
// the default sizes (2000 measurement packets of 32 bytes, 2 MB loss buffer,
// 4096 packet lengths). Wired traffic flows into the server throughout; the
// manual button starts the handshake on a clean link, so both nodes must end
// in QAM-16 with the client's count at 2000, and every wired packet must
// reach the client intact and in order.
module tb_ms_node_full;
  import ms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  node_cfg_t s_cfg, c_cfg;
  logic s_btn = 0;
  logic s_ein_v, s_ein_l;
  logic [7:0] s_ein_d;
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
  int unsigned s2c_sent, s2c_drop, c2s_sent, c2s_drop;

  ms_node u_srv (
    .clk, .rst_n, .cfg(s_cfg), .trig_enable(1'b1), .manual_btn(s_btn),
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
  ms_node u_cli (
    .clk, .rst_n, .cfg(c_cfg), .trig_enable(1'b1), .manual_btn(1'b0),
    .eth_in_valid(1'b0), .eth_in_data(8'h00), .eth_in_last(1'b0),
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
    .rx_mode(c_mode), .err_qpsk(0), .err_qam16(0), .drop_mask(16'h0),
    .rx_valid(c_rx_v), .rx_data(c_rx_d), .rx_last(c_rx_l), .rx_payload_ok(c_rx_ok),
    .n_sent(s2c_sent), .n_dropped(s2c_drop)
  );
  ofdm_link_model u_c2s (
    .clk, .tx_valid(c_tx_v), .tx_data(c_tx_d), .tx_last(c_tx_l), .tx_ready(c_tx_r),
    .rx_mode(s_mode), .err_qpsk(0), .err_qam16(0), .drop_mask(16'h0),
    .rx_valid(s_rx_v), .rx_data(s_rx_d), .rx_last(s_rx_l), .rx_payload_ok(s_rx_ok),
    .n_sent(c2s_sent), .n_dropped(c2s_drop)
  );

  // wired traffic: 512-byte numbered packets, one every 1500 cycles
  int next_id = 1;
  bit traffic_on = 0;
  function automatic byte unsigned pkt_byte(int id, int i);
    if (i == 0) return 8'(id >> 8);
    if (i == 1) return 8'(id);
    return 8'(id * 7 + i);
  endfunction
  initial begin
    s_ein_v = 0; s_ein_d = 0; s_ein_l = 0;
    forever begin
      @(posedge clk);
      if (traffic_on) begin
        for (int i = 0; i < 512; i++) begin
          s_ein_v <= 1'b1; s_ein_d <= pkt_byte(next_id, i); s_ein_l <= (i == 511);
          @(posedge clk);
        end
        s_ein_v <= 1'b0; s_ein_l <= 1'b0;
        next_id++;
        repeat (1000) @(posedge clk);
      end
    end
  end

  byte unsigned rxb[$];
  int last_id = 0, delivered = 0, max_level = 0, n_meas = 0, tx_byte = 0;
  always @(posedge clk) if (rst_n) begin
    if (c_eo_v) begin
      rxb.push_back(c_eo_d);
      if (c_eo_l) begin
        automatic int id = {rxb[0], rxb[1]};
        automatic bit ok = c_eo_g && (id == last_id + 1) && rxb.size() == 512;
        foreach (rxb[i]) if (rxb[i] != pkt_byte(id, i)) ok = 0;
        check(ok, $sformatf("wired packet %0d intact and in order", id));
        last_id = id; delivered++;
        rxb.delete();
      end
    end
    if (int'(s_lvl) > max_level) max_level = int'(s_lvl);
    if (s_tx_v && s_tx_r) begin
      if (tx_byte == 3 && s_tx_d == 8'(PKT_MEAS)) n_meas++;
      tx_byte = s_tx_l ? 0 : tx_byte + 1;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t1;
  initial begin
    s_cfg = '{is_server: 1'b1, auto_en: 1'b0, my_addr: 48'h0000_0000_0A01,
              peer_addr: 48'h0000_0000_0B02, auto_period: 32'd10_000_000,
              manual_period: 32'd1000, srv_timeout: 32'd4000,
              cli_timeout: 32'd1000, quiet_timeout: 32'd10000};
    c_cfg = s_cfg;
    c_cfg.is_server = 1'b0;
    c_cfg.my_addr   = 48'h0000_0000_0B02;
    c_cfg.peer_addr = 48'h0000_0000_0A01;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    traffic_on = 1;
    repeat (5000) @(posedge clk);
    s_btn <= 1'b1; repeat (2) @(posedge clk); s_btn <= 1'b0;
    wait (s_busy); t0 = cycle;
    wait (!s_busy && !c_busy); t1 = cycle;
    repeat (5) @(posedge clk);
    check(s_mode == MOD_QAM16 && c_mode == MOD_QAM16, "both nodes switched to QAM-16");
    check(s_common == MOD_QAM16 && c_common == MOD_QAM16, "common mode QAM-16");
    check(c_res == 32'd2000 && s_res == 32'd2000, $sformatf("client counted %0d of 2000", c_res));
    check(n_meas == 2000, $sformatf("%0d measurement packets sent", n_meas));
    check(max_level > 0, "wired traffic held in the buffer during the switch");
    repeat (20000) @(posedge clk);
    traffic_on = 0;
    repeat (5000) @(posedge clk);
    wait (s_lvl == 0);
    repeat (3000) @(posedge clk);
    check(delivered == next_id - 1 && delivered > 0,
          $sformatf("%0d of %0d wired packets delivered", delivered, next_id - 1));
    check(s_ovf == 0, "no overflow");
    $display("switch took %0d cycles, peak buffer %0d bytes, %0d packets delivered", t1 - t0, max_level, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
