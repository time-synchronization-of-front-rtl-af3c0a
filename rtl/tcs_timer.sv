// tcs_timer: front-end trigger counter and timer, reset by the TCS RESET
// command.
//
// 'timer' counts TCS clock periods (tcs_ce strobes, 38.88 MHz). 'trig_cnt'
// counts triggers. On each trigger the trigger number (counting from 0 after
// RESET) and the timer value are presented with trig_valid for one clock.
// A TCS RESET clears both counters, so every front-end that sees the same
// RESET has the same time and trigger numbering afterwards.
//
// Timing: all outputs registered; a trigger in the same clock as RESET is
// numbered 0 with time 0. rst (local) clears as RESET does.
//
// Clearing trigger counters and timers on RESET follows the document; the
// counter widths are this design's choice.
module tcs_timer #(
  parameter int unsigned TIMER_W = 32,
  parameter int unsigned TRIG_W  = 24
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tcs_ce,
  input  logic               tcs_reset,
  input  logic               trigger,
  output logic [TIMER_W-1:0] timer,
  output logic [TRIG_W-1:0]  trig_cnt,
  output logic               trig_valid,
  output logic [TRIG_W-1:0]  trig_num,
  output logic [TIMER_W-1:0] trig_time
);

  always_ff @(posedge clk) begin
    if (rst || tcs_reset) begin
      timer      <= '0;
      trig_cnt   <= trigger ? TRIG_W'(1) : '0;
      trig_valid <= trigger;
      trig_num   <= '0;
      trig_time  <= '0;
    end else begin
      if (tcs_ce) timer <= timer + 1'b1;
      trig_valid <= trigger;
      if (trigger) begin
        trig_cnt  <= trig_cnt + 1'b1;
        trig_num  <= trig_cnt;
        trig_time <= timer;
      end
    end
  end

endmodule
