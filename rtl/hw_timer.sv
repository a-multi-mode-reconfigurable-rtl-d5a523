// hw_timer: programmable one-shot countdown timer.
//
// The protocol's timers (start/end re-transmission, client acknowledgement
// re-transmission, quiescence, trigger) are hardware timers that raise an
// interrupt when they fire. Here each is this small block: `load` (re)starts it
// with `period` cycles, `stop` disarms it, and `expired` pulses for one cycle
// `period` cycles after the last load. A load in the same cycle as an expiry
// wins, so a restarted timer never reports the stale expiry. A period of 0 is
// treated as 1. The counter width is this design's choice.
module hw_timer #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         stop,
  input  logic [W-1:0] period,
  output logic         expired,
  output logic         running
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      running <= 1'b0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (load) begin
        cnt     <= (period == '0) ? W'(1) : period;
        running <= 1'b1;
      end else if (stop) begin
        running <= 1'b0;
      end else if (running) begin
        if (cnt == W'(1)) begin
          running <= 1'b0;
          expired <= 1'b1;
        end
        cnt <= cnt - W'(1);
      end
    end
  end
endmodule
