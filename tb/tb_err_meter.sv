// tb_err_meter: plays random streams of packet reports into the meter (mixed
// types, good and bad headers and payloads, repeated measurement sequence
// numbers) and compares good and bad counts with a reference count; checks
// that `clear` restarts the measurement.
module tb_err_meter;
  import ms_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, pkt_valid = 0, pkt_hdr_ok = 0, pkt_pay_ok = 0;
  mac_hdr_t pkt_hdr = '0;
  logic [31:0] good_cnt, bad_cnt;

  err_meter dut (.clk, .rst_n, .clear, .pkt_valid, .pkt_hdr, .pkt_hdr_ok,
                 .pkt_pay_ok, .good_cnt, .bad_cnt);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eg, eb, last_seq;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      clear = 1; @(negedge clk); clear = 0;
      check(good_cnt == 0 && bad_cnt == 0, "clear empties the counts");
      eg = 0; eb = 0; last_seq = -1;
      for (int s = 0; s < 300; s++) begin
        automatic int r = $urandom_range(9, 0);
        pkt_valid  = 1;
        pkt_hdr    = '0;
        pkt_hdr.pkt_type = (r == 0) ? 8'(PKT_DATA) : 8'(PKT_MEAS);
        pkt_hdr.seq = 16'((r == 1 && s > 0) ? s - 1 : s);   // r==1: duplicate
        pkt_hdr_ok = (r != 2);
        pkt_pay_ok = ($urandom_range(3, 0) != 0);
        if (pkt_hdr_ok && pkt_hdr.pkt_type == 8'(PKT_MEAS) && int'(pkt_hdr.seq) > last_seq) begin
          last_seq = int'(pkt_hdr.seq);
          if (pkt_pay_ok) eg++; else eb++;
        end
        @(negedge clk);
        pkt_valid = 0;
        if ($urandom_range(1, 0) == 1) @(negedge clk);
      end
      @(negedge clk);
      check(good_cnt == 32'(eg), $sformatf("round %0d good %0d expected %0d", round, good_cnt, eg));
      check(bad_cnt == 32'(eb),  $sformatf("round %0d bad %0d expected %0d", round, bad_cnt, eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
