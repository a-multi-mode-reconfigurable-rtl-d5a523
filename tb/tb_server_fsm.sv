// tb_server_fsm: plays the client's side of the handshake against the server
// FSM at packet level. It checks: Start re-sent every srv_timeout + 2 cycles
// with an increasing Resend count until Ack_Start; exactly N_MEAS
// Measurement packets with sequence 0..N_MEAS-1 in the current modulation;
// End re-sent until Result_End; the mode change taken from the table for the
// returned count; silence during the quiet period; Ack_Synch and commit on
// Synch; Ack_Synch in the normal state only after a completed handshake; the
// retry limit; and abort.
module tb_server_fsm;
  import ms_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int N = 20, ML = 8, THR = 3, MR = 3, TO = 100;
  logic trig = 0, hs_abort = 0, pkt_valid = 0, req_valid, req_ready = 1;
  logic mode_set, commit, busy, ev_resend, ev_giveup;
  mod_e cur_mode = MOD_QPSK, mode_new;
  mac_hdr_t pkt_hdr = '0;
  tx_req_t req;
  logic [2:0] state;
  logic [31:0] result;

  server_fsm #(.N_MEAS(N), .MEAS_LEN(ML), .ERR_THRESH(THR), .MAX_RETRY(MR)) dut (
    .clk, .rst_n, .enable(1'b1), .trig, .hs_abort, .srv_timeout(32'(TO)), .cur_mode,
    .pkt_valid, .pkt_hdr, .pkt_hdr_ok(1'b1), .pkt_for_me(1'b1),
    .req_valid, .req, .req_ready, .mode_set, .mode_new, .commit, .busy, .state,
    .ev_resend, .ev_giveup, .result);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  tx_req_t sent[$];
  longint  sent_t[$];
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    sent.push_back(req); sent_t.push_back(cyc);
  end
  int n_set = 0, n_commit = 0;
  bit stall_on = 1;
  mod_e last_new;
  always @(posedge clk) if (rst_n) begin
    if (mode_set) begin n_set++; last_new = mode_new; end
    if (commit) n_commit++;
  end

  task automatic rx(pkt_type_e t, logic [31:0] res = 0);
    pkt_hdr = '0; pkt_hdr.pkt_type = t; pkt_hdr.result = res;
    pkt_valid = 1; @(negedge clk); pkt_valid = 0;
  endtask
  function automatic int count(pkt_type_e t);
    int n = 0;
    foreach (sent[i]) if (sent[i].ptype == t) n++;
    return n;
  endfunction
  task automatic wait_type(pkt_type_e t, int k);
    int guard = 0;
    while (count(t) < k && guard < 100000) begin @(negedge clk); guard++; end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(sent.size() == 0 && !busy, "idle and silent after reset");
    // ---- initiation with two lost Start packets
    trig = 1; @(negedge clk); trig = 0;
    wait_type(PKT_START, 3);
    check(count(PKT_START) == 3, "Start re-sent");
    for (int i = 0; i < sent.size(); i++) check(sent[i].resend == 8'(i) && sent[i].dst == BCAST_ADDR
                                                && sent[i].fullrate == MOD_BPSK, "Start fields");
    check(sent_t[1] - sent_t[0] == TO + 2 && sent_t[2] - sent_t[1] == TO + 2,
          $sformatf("Start interval %0d", sent_t[1] - sent_t[0]));
    rx(PKT_ACK_START);
    // ---- measurement, with back-pressure
    fork
      repeat (600) begin
        if (stall_on) req_ready = ($urandom_range(2, 0) != 0);
        @(negedge clk);
      end
    join_none
    wait_type(PKT_END, 1);
    k = 0;
    foreach (sent[i]) if (sent[i].ptype == PKT_MEAS) begin
      check(sent[i].seq == 16'(k) && sent[i].length == 16'(ML) && sent[i].fullrate == MOD_QPSK,
            $sformatf("measurement %0d fields", k));
      k++;
    end
    check(k == N, $sformatf("%0d measurement packets", k));
    check(count(PKT_START) == 3, "no Start after Ack_Start");
    wait_type(PKT_END, 2);
    check(sent[sent.size()-1].resend == 8'd1, "End re-sent with Resend 1");
    stall_on = 0;
    req_ready = 1;
    // ---- result: N - 1 good -> 1 error < 3 -> QAM-16
    rx(PKT_RESULT_END, 32'(N - 1));
    @(negedge clk);
    check(n_set == 1 && last_new == MOD_QAM16, "mode set to QAM-16 from the table");
    check(result == 32'(N - 1), "result latched");
    cur_mode = MOD_QAM16;
    k = sent.size();
    repeat (3 * TO) @(negedge clk);
    check(sent.size() == k, "quiet period: nothing sent");
    check(busy, "still in the handshake while quiet");
    rx(PKT_SYNCH);
    repeat (3) @(negedge clk);
    check(sent[sent.size()-1].ptype == PKT_ACK_SYNCH, "Ack_Synch answers Synch");
    check(n_commit == 1 && !busy, "commit and back to normal");
    rx(PKT_SYNCH);
    repeat (3) @(negedge clk);
    check(count(PKT_ACK_SYNCH) == 2, $sformatf("repeated Synch answered in the normal state %0d", count(PKT_ACK_SYNCH)));
    // ---- result with many errors in QAM-16 -> QPSK
    sent.delete(); sent_t.delete();
    trig = 1; @(negedge clk); trig = 0;
    wait_type(PKT_START, 1);
    rx(PKT_ACK_START);
    wait_type(PKT_END, 1);
    rx(PKT_RESULT_END, 32'(N - 10));
    @(negedge clk);
    check(last_new == MOD_QPSK, "mode set to QPSK from the table");
    cur_mode = MOD_QPSK;
    // no Synch: the quiet period ends at the retry limit
    repeat ((MR + 2) * (TO + 2)) @(negedge clk);
    check(!busy, "quiet period bounded by the retry limit");
    rx(PKT_SYNCH);
    repeat (3) @(negedge clk);
    check(count(PKT_ACK_SYNCH) == 0, $sformatf("no Ack_Synch after an incomplete handshake %0d", count(PKT_ACK_SYNCH)));
    // ---- give up on Start
    sent.delete(); sent_t.delete();
    trig = 1; @(negedge clk); trig = 0;
    repeat ((MR + 3) * (TO + 2)) @(negedge clk);
    check(count(PKT_START) == MR + 1 && !busy, $sformatf("gives up after %0d Starts", count(PKT_START)));
    // ---- abort
    trig = 1; @(negedge clk); trig = 0;
    repeat (5) @(negedge clk);
    hs_abort = 1; @(negedge clk); hs_abort = 0;
    check(!busy, "abort returns to normal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
