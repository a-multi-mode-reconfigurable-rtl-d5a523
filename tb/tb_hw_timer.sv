// tb_hw_timer: checks that the timer fires exactly `period` cycles after a
// load, once; that `stop` disarms it; that a reload restarts the count; and
// that a period of 0 behaves as 1.
module tb_hw_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load = 0, stop = 0, expired, running;
  logic [15:0] period = '0;
  int checks = 0, failures = 0;

  hw_timer #(.W(16)) dut (.clk, .rst_n, .load, .stop, .period, .expired, .running);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // load, then count cycles until the expiry pulse
  task automatic measure(input int p, output int n);
    @(negedge clk); load = 1; period = 16'(p);
    @(negedge clk); load = 0;
    n = 0;
    while (!expired && n < 5000) begin @(negedge clk); n++; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, pulses;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!running && !expired, "idle after reset");
    for (int p = 1; p <= 40; p += 3) begin
      measure(p, n);
      check(n == p, $sformatf("period %0d fired after %0d cycles", p, n));
      @(negedge clk);
      check(!expired && !running, "single pulse, then idle");
    end
    measure(0, n);
    check(n == 1, "period 0 acts as 1");
    // stop
    @(negedge clk); load = 1; period = 16'd10;
    @(negedge clk); load = 0;
    repeat (4) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    pulses = 0;
    repeat (30) begin @(negedge clk); if (expired) pulses++; end
    check(pulses == 0 && !running, "stop disarms the timer");
    // reload restarts the count
    @(negedge clk); load = 1; period = 16'd20;
    @(negedge clk); load = 0;
    repeat (10) @(negedge clk);
    load = 1; period = 16'd20;
    @(negedge clk); load = 0;
    n = 0;
    while (!expired && n < 100) begin @(negedge clk); n++; end
    check(n == 20, $sformatf("reload restarts: fired %0d cycles after reload", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
