// tb_mode_table: sweeps every good-packet count from 0 to N_MEAS + 5 for each
// current mode and compares the table's decision with the switching rule:
// QPSK goes up to QAM-16 when errors < threshold, QAM-16 goes down to QPSK
// when errors > threshold, BPSK and the boundaries stay put.
module tb_mode_table;
  import ms_pkg::*;
  int checks = 0, failures = 0;
  mod_e cur, nm;
  logic [31:0] good;
  logic change;

  mode_table #(.N_MEAS(2000), .ERR_THRESH(100)) dut (
    .cur_mode(cur), .good_cnt(good), .new_mode(nm), .change);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mod_e modes[3] = '{MOD_QPSK, MOD_QAM16, MOD_BPSK};
    foreach (modes[m]) for (int g = 0; g <= 2005; g++) begin
      automatic int err = (g >= 2000) ? 0 : 2000 - g;
      automatic mod_e e = modes[m];
      if (modes[m] == MOD_QPSK  && err < 100) e = MOD_QAM16;
      if (modes[m] == MOD_QAM16 && err > 100) e = MOD_QPSK;
      cur = modes[m]; good = 32'(g);
      #1;
      checks++;
      if (nm != e || change != (e != modes[m])) begin
        failures++;
        if (failures < 10) $display("FAIL: mode %0d good %0d -> %0d", modes[m], g, nm);
      end
    end
    // the two boundary points of the rule
    cur = MOD_QPSK;  good = 32'd1900; #1; checks++; if (nm != MOD_QPSK)  failures++;
    cur = MOD_QPSK;  good = 32'd1901; #1; checks++; if (nm != MOD_QAM16) failures++;
    cur = MOD_QAM16; good = 32'd1900; #1; checks++; if (nm != MOD_QAM16) failures++;
    cur = MOD_QAM16; good = 32'd1899; #1; checks++; if (nm != MOD_QPSK)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
