// tb_loss_buffer: writes random-length packets with no back-pressure while a
// reader with random stalls drains them, on a small buffer (256 bytes, 8
// lengths). A reference model decides, byte for byte, which packets must be
// dropped because the array or the length FIFO is full; the test checks that
// exactly the kept packets come out, whole and in order, that `overflow_cnt`
// equals the number dropped and that `level` matches the bytes stored.
module tb_loss_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int DEPTH = 256, LDEPTH = 8;

  logic in_valid = 0, in_last = 0, rd_ready = 0;
  logic [7:0] in_data = 0;
  logic pkt_avail, rd_valid, ev_overflow;
  logic [15:0] head_len, pkt_count;
  logic [7:0] rd_data;
  logic [31:0] level, overflow_cnt;

  loss_buffer #(.DEPTH(DEPTH), .LEN_DEPTH(LDEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_last, .pkt_avail, .head_len,
    .rd_valid, .rd_data, .rd_ready, .level, .pkt_count, .overflow_cnt, .ev_overflow);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  // reference: committed bytes and packets
  int ref_bytes = 0, ref_pkts = 0, ref_drop = 0;
  int kept_ids[$];
  int kept_lens[$];
  byte unsigned rxb[$];
  int rx_pkts = 0;
  bit reading = 1;

  // reader: consumes bytes and rebuilds packets using head_len
  int rcnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_valid && rd_ready) begin
      rxb.push_back(rd_data);
      rcnt = rcnt + 1;
      if (rcnt == head_len) begin
        automatic int id = kept_ids.pop_front();
        automatic int ln = kept_lens.pop_front();
        automatic bit ok = (rxb.size() == ln);
        foreach (rxb[i]) if (rxb[i] != 8'(id * 5 + i)) ok = 0;
        check(ok, $sformatf("packet %0d read back whole", id));
        rxb.delete();
        rcnt = 0;
        rx_pkts++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of stored bytes: updated from the reader's side too
  int stored = 0, stored_pkts = 0;
  always @(posedge clk) if (rst_n && rd_valid && rd_ready) begin
    stored--;
    if (rcnt + 1 == head_len) stored_pkts--;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!pkt_avail && level == 0, "empty after reset");
    for (int id = 1; id <= 300; id++) begin
      automatic int len = $urandom_range(60, 1);
      automatic int pending = 0;
      automatic bit drop = 0;
      for (int i = 0; i < len; i++) begin
        rd_ready = reading && ($urandom_range(2, 0) != 0);
        in_valid = 1; in_data = 8'(id * 5 + i); in_last = (i == len - 1);
        // space check uses the state before this clock edge, as the RTL does
        if (!drop) begin
          if (stored + pending + 1 > DEPTH - 1 || (in_last && stored_pkts == LDEPTH)) drop = 1;
          else pending++;
        end
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      if (drop) ref_drop++;
      else begin
        kept_ids.push_back(id); kept_lens.push_back(len);
        stored += len; stored_pkts++;
      end
      // reader pauses during some stretches to force overflow
      reading = !((id % 40) >= 20);
      rd_ready = 0;
      repeat ($urandom_range(3, 0)) @(negedge clk);
      check(level == 32'(stored), $sformatf("level %0d expected %0d", level, stored));
      check(overflow_cnt == 32'(ref_drop), $sformatf("overflow %0d expected %0d", overflow_cnt, ref_drop));
    end
    reading = 1;
    while (pkt_avail) begin rd_ready = 1; @(negedge clk); end
    rd_ready = 0;
    repeat (3) @(negedge clk);
    check(kept_ids.size() == 0, "every kept packet read out");
    check(ref_drop > 0, $sformatf("overflow happened (%0d packets)", ref_drop));
    check(level == 0, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
