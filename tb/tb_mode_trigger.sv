// tb_mode_trigger: checks the periodic automatic trigger (one pulse every
// auto_period + 1 cycles), the manual button (pulse manual_period + 1 cycles
// after the clock edge that samples the press, marked manual, with the automatic schedule resuming
// afterwards), the resume input, and that `enable` low turns triggering off.
module tb_mode_trigger;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic enable = 0, auto_en = 0, manual_btn = 0, resume = 0;
  logic [31:0] auto_period = 32'd50, manual_period = 32'd7;
  logic trig;
  logic [1:0] trig_src;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  mode_trigger dut (.clk, .rst_n, .enable, .auto_en, .manual_btn, .resume,
                    .auto_period, .manual_period, .trig, .trig_src);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  longint t_trig[$];
  logic [1:0] s_trig[$];
  always @(posedge clk) if (rst_n && trig) begin
    t_trig.push_back(cyc);
    s_trig.push_back(trig_src);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // disabled: nothing
    repeat (200) @(negedge clk);
    check(t_trig.size() == 0, "no trigger while disabled");
    // automatic
    enable = 1; auto_en = 1;
    repeat (400) @(negedge clk);
    check(t_trig.size() >= 6, $sformatf("automatic triggers: %0d", t_trig.size()));
    for (int i = 1; i < t_trig.size(); i++)
      check(t_trig[i] - t_trig[i-1] == 51, $sformatf("auto interval %0d", t_trig[i] - t_trig[i-1]));
    foreach (s_trig[i]) check(s_trig[i] == 2'd0, "automatic source");
    // manual press in the middle of an automatic period
    @(posedge trig);
    repeat (5) @(negedge clk);
    t_trig.delete(); s_trig.delete();
    manual_btn = 1; t0 = cyc;
    repeat (30) @(negedge clk);
    manual_btn = 0;
    check(t_trig.size() == 1, $sformatf("one manual trigger, got %0d", t_trig.size()));
    if (t_trig.size() >= 1) begin
      check(t_trig[0] - t0 == 9, $sformatf("manual trigger after %0d cycles", t_trig[0] - t0));
      check(s_trig[0] == 2'd1, "manual source");
    end
    // automatic schedule resumes
    repeat (120) @(negedge clk);
    check(t_trig.size() >= 3, "automatic schedule resumes after manual trigger");
    if (t_trig.size() >= 2) check(s_trig[1] == 2'd0, "later triggers automatic");
    // resume input
    t_trig.delete(); s_trig.delete();
    auto_en = 0;
    repeat (60) @(negedge clk);
    t_trig.delete(); s_trig.delete();
    resume = 1; t0 = cyc; @(negedge clk); resume = 0;
    repeat (200) @(negedge clk);
    check(t_trig.size() == 1 && s_trig[0] == 2'd2 && t_trig[0] - t0 == 1, "resume triggers at once");
    // manual only, automatic off
    t_trig.delete(); s_trig.delete();
    manual_btn = 1; @(negedge clk); manual_btn = 0;
    repeat (300) @(negedge clk);
    check(t_trig.size() == 1 && s_trig[0] == 2'd1, "manual with automatic off fires once");
    // disable mid-countdown
    t_trig.delete(); s_trig.delete();
    auto_en = 1;
    repeat (20) @(negedge clk);
    enable = 0;
    repeat (300) @(negedge clk);
    check(t_trig.size() == 0, "disable stops a running countdown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
