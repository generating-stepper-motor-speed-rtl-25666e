// periph_timer: resettable modulo base timer of the stepper peripheral.
//
// Counts clock cycles from 0 to period-1 and wraps. The cycle in which it
// wraps is flagged on tick: that overflow is the only moment the core state
// machine may change state or issue a step, so every inter-step delay is a
// whole number of timer periods. The running count is also the carrier that
// the PWM generators compare duty values against, so one timer period is one
// PWM period.
//
// The divider needs 33 cycles and the hand-over of its result one more, so the
// period may not be shorter than MIN_PERIOD = 34 clocks. A smaller requested
// modulo (including 0) is raised to MIN_PERIOD; clamped reports that this
// happened. The bound comes from the controller description; raising the
// value instead of rejecting it is this design's choice.
//
// clear restarts the count at 0 on the next edge and suppresses tick in its
// cycle (used when a rotation starts, so the first delay is whole periods). tick is combinational from the
// count register: high in the last cycle of each period.
module periph_timer #(
  parameter int unsigned TW         = 16,
  parameter int unsigned MIN_PERIOD = 34
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [TW-1:0] modulo,
  output logic [TW-1:0] count,
  output logic          tick,
  output logic          clamped
);

  logic [TW-1:0] period;

  always_comb begin
    clamped = (modulo < TW'(MIN_PERIOD));
    period  = clamped ? TW'(MIN_PERIOD) : modulo;
  end

  // >= also covers a period lowered below the current count. No overflow is
  // reported in a clearing cycle, so a restarted period is always whole.
  assign tick = !clear && (count >= period - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (clear)   count <= '0;
    else if (tick)    count <= '0;
    else              count <= count + 1'b1;
  end

endmodule
