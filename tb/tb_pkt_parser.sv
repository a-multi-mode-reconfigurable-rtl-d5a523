// tb_pkt_parser: feeds reference-built packets, with random idle gaps, into
// the parser: protocol broadcasts, data for this node with good and failed
// payloads, data for another node, packets with a corrupted header byte and
// truncated packets. It checks the reported header fields and flags and the
// payload bytes forwarded to the wired side.
module tb_pkt_parser;
  import ms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [47:0] MY = 48'h0000_0000_0B02;
  localparam logic [47:0] PEER = 48'h0000_0000_0A01;
  logic rx_valid = 0, rx_last = 0, rx_payload_ok = 0;
  logic [7:0] rx_data = 0;
  logic pkt_valid, pkt_hdr_ok, pkt_for_me, pkt_pay_ok;
  mac_hdr_t pkt_hdr;
  logic out_valid, out_last, out_good;
  logic [7:0] out_data;

  pkt_parser dut (.clk, .rst_n, .my_addr(MY), .rx_valid, .rx_data, .rx_last,
                  .rx_payload_ok, .pkt_valid, .pkt_hdr, .pkt_hdr_ok, .pkt_for_me,
                  .pkt_pay_ok, .out_valid, .out_data, .out_last, .out_good);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  byte unsigned fwd[$];
  bit fwd_good;
  int n_pkt = 0;
  mac_hdr_t   l_hdr;
  logic       l_ok, l_me, l_pay;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      fwd.push_back(out_data);
      if (out_last) fwd_good = out_good;
    end
    if (pkt_valid) begin
      n_pkt++;
      l_hdr = pkt_hdr; l_ok = pkt_hdr_ok; l_me = pkt_for_me; l_pay = pkt_pay_ok;
    end
  end

  task automatic send(bytes_t b, bit pay_ok);
    foreach (b[i]) begin
      while ($urandom_range(4, 0) == 0) begin
        rx_valid = 0; @(negedge clk);
      end
      rx_valid = 1; rx_data = b[i]; rx_last = (i == b.size() - 1);
      rx_payload_ok = rx_last && pay_ok;
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0; rx_payload_ok = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t b;
    int n_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic int kind = n % 6;  // 0 protocol, 1 data ok, 2 data bad, 3 other dst, 4 corrupt, 5 truncated
      automatic int len = (kind == 0 || kind == 4) ? 0 : $urandom_range(80, 1);
      automatic logic [47:0] dst = (kind == 0 || kind == 4) ? BCAST_ADDR : (kind == 3) ? 48'h0000_0000_0C03 : MY;
      automatic byte unsigned ty = (kind == 0 || kind == 4) ? 8'(PKT_END) : 8'(PKT_DATA);
      automatic logic [31:0] res = $urandom;
      automatic logic [15:0] sq = 16'($urandom);
      automatic bytes_t pay;
      b = ref_header(8'(MOD_QPSK), len, ty, dst, PEER, 8'(n), res, sq);
      for (int i = 0; i < len; i++) begin pay.push_back(8'($urandom)); b.push_back(pay[i]); end
      if (kind == 4) b[$urandom_range(61, 0)] ^= 8'h10;
      if (kind == 5) begin b = b[0:29]; end
      fwd.delete(); fwd_good = 0;
      n_before = n_pkt;
      send(b, kind != 2);
      check(n_pkt == n_before + 1, $sformatf("pkt %0d: one pkt_valid", n));
      case (kind)
        0: begin
          check(l_ok && l_me && l_pay, "protocol broadcast accepted");
          check(l_hdr.pkt_type == 8'(PKT_END) && l_hdr.src == PEER && l_hdr.resend == 8'(n)
                && l_hdr.result == res && l_hdr.seq == sq, "protocol header fields");
          check(fwd.size() == 0, "protocol packet not forwarded");
        end
        1, 2: begin
          check(l_ok && l_me, "data for me accepted");
          check(l_pay == (kind == 1), "payload flag");
          check(l_hdr.length == 16'(len) && l_hdr.dst == MY, "data header fields");
          check(fwd.size() == len, $sformatf("forwarded %0d of %0d bytes", fwd.size(), len));
          foreach (pay[i]) if (i < fwd.size()) check(fwd[i] == pay[i], "forwarded byte");
          check(fwd_good == (kind == 1), "out_good follows the payload result");
        end
        3: begin
          check(l_ok && !l_me, "data for another node: header good, not for me");
          check(fwd.size() == 0, "not forwarded");
        end
        4: check(!l_ok, "corrupted header rejected");
        5: begin
          check(!l_ok && !l_me, "truncated packet rejected");
          check(fwd.size() == 0, "truncated not forwarded");
        end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
