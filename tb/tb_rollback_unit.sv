// tb_rollback_unit: feeds packet reports with good headers and failing
// payloads and checks that the rollback starts on exactly the packet that
// takes the tally past RB_THRESH; that a decoded packet or a failing packet
// from another source resets the tally and that measurement packets are not
// counted; that Rollback goes to the failing source in BPSK, re-sent every
// retry_timeout + 2 cycles until Ack_Rollback, then restore and resume; the
// retry limit; and the responder side (Rollback in, Ack_Rollback out).
module tb_rollback_unit;
  import ms_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int THR = 4, MR = 2, TO = 60;
  localparam logic [47:0] A = 48'h0000_0000_00AA, B = 48'h0000_0000_00BB;
  logic pkt_valid = 0, pkt_pay_ok = 0, req_valid, req_ready = 1;
  logic hs_abort, restore, resume, busy, ev_rollback;
  mac_hdr_t pkt_hdr = '0;
  tx_req_t req;
  logic [15:0] bad_tally;

  rollback_unit #(.RB_THRESH(THR), .MAX_RETRY(MR)) dut (
    .clk, .rst_n, .retry_timeout(32'(TO)), .pkt_valid, .pkt_hdr, .pkt_hdr_ok(1'b1),
    .pkt_for_me(1'b1), .pkt_pay_ok, .req_valid, .req, .req_ready, .hs_abort,
    .restore, .resume, .busy, .bad_tally, .ev_rollback);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  tx_req_t sent[$];
  longint  sent_t[$];
  int n_abort = 0, n_restore = 0, n_resume = 0, n_ev = 0;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin sent.push_back(req); sent_t.push_back(cyc); end
    if (hs_abort) n_abort++;
    if (restore) n_restore++;
    if (resume) n_resume++;
    if (ev_rollback) n_ev++;
  end

  task automatic rx(pkt_type_e t, logic [47:0] src, bit ok, int len = 40);
    pkt_hdr = '0; pkt_hdr.pkt_type = t; pkt_hdr.src = src; pkt_hdr.length = 16'(len);
    pkt_pay_ok = ok;
    pkt_valid = 1; @(negedge clk); pkt_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // tally resets
    repeat (3) rx(PKT_DATA, A, 0);
    rx(PKT_DATA, A, 1);
    repeat (4) rx(PKT_DATA, A, 0);
    rx(PKT_DATA, B, 0);
    repeat (4) rx(PKT_DATA, A, 0);
    repeat (10) rx(PKT_MEAS, A, 0, 16);
    rx(PKT_ACK, A, 0, 0);
    check(n_abort == 0 && !busy && sent.size() == 0, "no rollback below the threshold");
    check(bad_tally == 16'(THR), $sformatf("tally %0d", bad_tally));
    // the next failing packet trips it
    rx(PKT_DATA, A, 0);
    check(n_abort == 1 && n_ev == 1 && busy, "rollback starts past the threshold");
    check(sent.size() == 1 && sent[0].ptype == PKT_ROLLBACK && sent[0].dst == A
          && sent[0].fullrate == MOD_BPSK, "Rollback to the source in BPSK");
    repeat (2 * (TO + 2)) @(negedge clk);
    check(sent.size() == 3, $sformatf("Rollback re-sent: %0d", sent.size()));
    if (sent.size() >= 2) check(sent_t[1] - sent_t[0] == TO + 2, $sformatf("Rollback interval %0d", sent_t[1] - sent_t[0]));
    rx(PKT_ACK_ROLLBACK, B, 1, 0);
    check(n_restore == 0, "Ack_Rollback from another node ignored");
    rx(PKT_ACK_ROLLBACK, A, 1, 0);
    check(n_restore == 1 && n_resume == 1 && !busy, "Ack_Rollback: restore and resume");
    // retry limit
    sent.delete(); sent_t.delete();
    repeat (THR + 1) rx(PKT_DATA, A, 0);
    repeat ((MR + 3) * (TO + 2)) @(negedge clk);
    check(sent.size() == MR + 1 && !busy && n_restore == 1, $sformatf("gives up after %0d Rollbacks", sent.size()));
    // responder side
    sent.delete();
    rx(PKT_ROLLBACK, B, 1, 0);
    check(n_restore == 2 && n_resume == 2 && n_abort == 3, "Rollback received: abort, restore, resume");
    check(sent.size() == 1 && sent[0].ptype == PKT_ACK_ROLLBACK && sent[0].dst == B, "Ack_Rollback to the requester");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
