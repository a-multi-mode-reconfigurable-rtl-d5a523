// mode_trigger: starts a mode-switching handshake on the server node.
//
// Two trigger schemes share one hw_timer. After reset, and after every firing,
// the timer is loaded with the automatic period while `auto_en` is set, so the
// trigger is periodic. A rising edge on the manual button reloads the same
// timer with the shorter manual period, so the handshake appears to start
// right after the press. `resume` (from the rollback unit) requests an
// immediate handshake. `trig` is a one-cycle pulse; `trig_src` tells which
// scheme caused it (0 automatic, 1 manual, 2 resume). With `enable` low the
// trigger is turned off: the timer is stopped and nothing fires.
// Sharing one timer and the shorter manual expiry follow the original system; the
// edge detect on the button and the resume input are this design's choices.
module mode_trigger (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        auto_en,
  input  logic        manual_btn,
  input  logic        resume,
  input  logic [31:0] auto_period,
  input  logic [31:0] manual_period,
  output logic        trig,
  output logic [1:0]  trig_src
);
  logic btn_q, manual_pending, started;
  logic t_load, t_stop, t_exp, t_run;
  logic [31:0] t_period;

  wire btn_rise = manual_btn & ~btn_q;

  hw_timer #(.W(32)) u_timer (
    .clk, .rst_n, .load(t_load), .stop(t_stop), .period(t_period),
    .expired(t_exp), .running(t_run)
  );

  always_comb begin
    t_load   = 1'b0;
    t_stop   = 1'b0;
    t_period = auto_period;
    if (!enable) begin
      t_stop = t_run;
    end else if (btn_rise) begin
      t_load   = 1'b1;
      t_period = manual_period;
    end else if (auto_en && (t_exp || !started || (!t_run && !manual_pending))) begin
      t_load   = 1'b1;
      t_period = auto_period;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_q          <= 1'b0;
      manual_pending <= 1'b0;
      started        <= 1'b0;
      trig           <= 1'b0;
      trig_src       <= 2'd0;
    end else begin
      btn_q <= manual_btn;
      trig  <= 1'b0;
      if (t_load) started <= 1'b1;
      if (enable && btn_rise) manual_pending <= 1'b1;
      if (!enable) manual_pending <= 1'b0;
      if (enable && resume) begin
        trig     <= 1'b1;
        trig_src <= 2'd2;
      end else if (enable && t_exp && !btn_rise) begin
        trig           <= 1'b1;
        trig_src       <= manual_pending ? 2'd1 : 2'd0;
        manual_pending <= 1'b0;
      end
    end
  end
endmodule
