// tb_client_fsm: plays the server's side against the client FSM at packet
// level. It checks: Ack_Start on Start, re-sent every cli_timeout + 2 cycles
// and at once on a repeated Start, stopped by the first Measurement packet;
// Result_End carrying the meter's count, re-sent on the short timer; the
// quiescence timer restarted by every End, with mode_set rising on the clock
// edge quiet_timeout + 1 edges after the one that took the last End (sampled
// one edge later, quiet_timeout + 2); the mode from the table applied only then; Synch
// re-sent until Ack_Synch, then commit; the retry limit on Synch; and the
// inactivity timeout during measurement.
module tb_client_fsm;
  import ms_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int N = 20, THR = 3, MR = 3, TO = 50, QT = 300;
  logic hs_abort = 0, pkt_valid = 0, req_valid, req_ready = 1;
  logic meter_clear, mode_set, commit, busy, ev_resend, ev_quiesce, ev_giveup;
  logic [31:0] meter_good = 0, result;
  mod_e cur_mode = MOD_QPSK, mode_new;
  mac_hdr_t pkt_hdr = '0;
  tx_req_t req;
  logic [2:0] state;

  client_fsm #(.N_MEAS(N), .ERR_THRESH(THR), .MAX_RETRY(MR)) dut (
    .clk, .rst_n, .enable(1'b1), .hs_abort, .cli_timeout(32'(TO)), .quiet_timeout(32'(QT)),
    .cur_mode, .pkt_valid, .pkt_hdr, .pkt_hdr_ok(1'b1), .pkt_for_me(1'b1),
    .meter_clear, .meter_good, .req_valid, .req, .req_ready, .mode_set, .mode_new,
    .commit, .busy, .state, .ev_resend, .ev_quiesce, .ev_giveup, .result);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  tx_req_t sent[$];
  longint  sent_t[$];
  int n_clear = 0, n_set = 0, n_commit = 0, n_quiesce = 0;
  longint t_set, t_end;
  mod_e last_new;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin sent.push_back(req); sent_t.push_back(cyc); end
    if (meter_clear) n_clear++;
    if (mode_set) begin n_set++; last_new = mode_new; t_set = cyc; end
    if (commit) n_commit++;
    if (ev_quiesce) n_quiesce++;
    if (pkt_valid && pkt_hdr.pkt_type == 8'(PKT_END)) t_end = cyc;
  end

  task automatic rx(pkt_type_e t);
    pkt_hdr = '0; pkt_hdr.pkt_type = t;
    pkt_valid = 1; @(negedge clk); pkt_valid = 0;
  endtask
  function automatic int count(pkt_type_e t);
    int n = 0;
    foreach (sent[i]) if (sent[i].ptype == t) n++;
    return n;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    // ---- initiation
    rx(PKT_START);
    check(n_clear == 1, "meter cleared on Start");
    repeat (2 * (TO + 2) + 5) @(negedge clk);
    check(count(PKT_ACK_START) == 3, $sformatf("Ack_Start sent and re-sent: %0d", count(PKT_ACK_START)));
    if (sent.size() >= 3)
      check(sent_t[1] - sent_t[0] == TO + 2 && sent_t[2] - sent_t[1] == TO + 2,
            $sformatf("Ack_Start interval %0d", sent_t[1] - sent_t[0]));
    k = count(PKT_ACK_START);
    rx(PKT_START);
    repeat (2) @(negedge clk);
    check(count(PKT_ACK_START) == k + 1, "repeated Start answered at once");
    rx(PKT_MEAS);
    k = sent.size();
    repeat (3 * TO) @(negedge clk);
    check(sent.size() == k, "Ack_Start stops once measurement begins");
    // ---- measurement ends: 19 of 20 good
    meter_good = 32'(N - 1);
    rx(PKT_END);
    repeat (2) @(negedge clk);
    check(sent[sent.size()-1].ptype == PKT_RESULT_END && sent[sent.size()-1].result == 32'(N - 1),
          "Result_End carries the count");
    // End keeps arriving: the quiescence timer keeps restarting
    repeat (4) begin repeat (QT - 50) @(negedge clk); rx(PKT_END); end
    check(n_set == 0 && count(PKT_RESULT_END) >= 4, "no mode change while End keeps coming");
    check(sent[sent.size()-1].resend > 0, "Result_End re-sent");
    // End stops
    repeat (QT + 10) @(negedge clk);
    check(n_set == 1 && last_new == MOD_QAM16 && n_quiesce == 1, "quiescence detected, QAM-16 applied");
    check(t_set - t_end == QT + 2, $sformatf("quiescence fired %0d cycles after the last End", t_set - t_end));
    cur_mode = MOD_QAM16;
    repeat (2 * (TO + 2)) @(negedge clk);
    check(count(PKT_SYNCH) >= 2, "Synch re-sent");
    rx(PKT_ACK_SYNCH);
    repeat (2) @(negedge clk);
    check(n_commit == 1 && !busy, "Ack_Synch: commit and back to normal");
    k = count(PKT_SYNCH);
    repeat (3 * TO) @(negedge clk);
    check(count(PKT_SYNCH) == k, "no Synch after Ack_Synch");
    // ---- Synch never acknowledged: give up without commit
    sent.delete(); sent_t.delete();
    meter_good = 32'(N - 10);
    rx(PKT_START); rx(PKT_MEAS); rx(PKT_END);
    repeat (QT + (MR + 3) * (TO + 2)) @(negedge clk);
    check(last_new == MOD_QPSK, "QAM-16 with many errors -> QPSK");
    check(count(PKT_SYNCH) == MR + 1 && !busy && n_commit == 1, $sformatf("Synch given up after %0d", count(PKT_SYNCH)));
    // ---- server stops during measurement
    rx(PKT_START); rx(PKT_MEAS);
    check(busy, "busy in measurement");
    repeat (QT + 10) @(negedge clk);
    check(!busy, "inactivity during measurement returns to normal");
    // ---- abort
    rx(PKT_START);
    hs_abort = 1; @(negedge clk); hs_abort = 0;
    check(!busy, "abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
