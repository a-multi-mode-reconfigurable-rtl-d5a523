// tb_pkt_framer: sends protocol, measurement and data requests through the
// framer with random back-pressure on the PHY side and random gaps in the
// data payload source, and compares every transmitted byte, the `tx_last`
// position and the request handshake against the reference header layout.
module tb_pkt_framer;
  import ms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [47:0] MY = 48'h0012_3456_789A;
  logic req_valid = 0, req_ready;
  tx_req_t req;
  logic pay_valid, pay_ready, tx_valid, tx_last, tx_ready;
  logic [7:0] pay_data, tx_data;

  pkt_framer dut (.clk, .rst_n, .my_addr(MY), .req_valid, .req, .req_ready,
                  .pay_valid, .pay_data, .pay_ready, .tx_valid, .tx_data,
                  .tx_last, .tx_ready);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  // data payload source: byte k of the current data packet is 8'(3*k + 1)
  int pay_k = 0;
  bit pay_gap;
  assign pay_valid = !pay_gap;
  assign pay_data  = 8'(3 * pay_k + 1);
  always @(posedge clk) begin
    if (pay_valid && pay_ready) pay_k <= pay_k + 1;
    pay_gap  <= ($urandom_range(3, 0) == 0);
    tx_ready <= ($urandom_range(3, 0) != 0);
  end

  byte unsigned got[$];
  bit got_last[$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    got.push_back(tx_data);
    got_last.push_back(tx_last);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t exp;
    pkt_type_e types[4] = '{PKT_START, PKT_MEAS, PKT_DATA, PKT_RESULT_END};
    tx_ready = 1; pay_gap = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      automatic pkt_type_e t = types[n % 4];
      automatic int len = (t == PKT_MEAS) ? 32 : (t == PKT_DATA) ? $urandom_range(120, 1) : 0;
      req = '0;
      req.ptype    = t;
      req.dst      = (t == PKT_DATA) ? 48'h0000_0000_0B02 : BCAST_ADDR;
      req.resend   = 8'(n);
      req.result   = $urandom;
      req.seq      = 16'($urandom);
      req.length   = 16'(len);
      req.fullrate = (t == PKT_START || t == PKT_RESULT_END) ? MOD_BPSK : MOD_QAM16;
      exp = ref_header(8'(req.fullrate), len, 8'(t), req.dst, MY, req.resend, req.result, req.seq);
      for (int i = 0; i < len; i++)
        exp.push_back(t == PKT_MEAS ? 8'(req.seq[7:0] + 8'(i)) : 8'(3 * (pay_k + i) + 1));
      got.delete(); got_last.delete();
      @(negedge clk);
      check(req_ready, "framer idle before a request");
      req_valid = 1;
      @(negedge clk);
      req_valid = 0;
      check(!req_ready, "framer busy after accepting");
      while (!(got.size() > 0 && got_last[got.size()-1])) @(negedge clk);
      check(got.size() == exp.size(), $sformatf("pkt %0d: %0d bytes, expected %0d", n, got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size())
        check(got[i] == exp[i], $sformatf("pkt %0d byte %0d: %02x expected %02x", n, i, got[i], exp[i]));
      foreach (got_last[i]) if (i < got.size() - 1) check(!got_last[i], "tx_last only on the final byte");
      repeat (2) @(negedge clk);
      check(req_ready, "framer idle after the packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
