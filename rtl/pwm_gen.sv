// pwm_gen: the two PWM generators of the stepper peripheral.
//
// A micro-step moves the current from one winding to the next: the winding
// that is being left follows a falling duty curve and the winding that is
// being entered a rising one. Both curves come from one duty table of
// MICROSTEPS+1 entries, indexed by micro_step: the rising signal uses entry
// micro_step and the falling signal entry MICROSTEPS - micro_step. A signal is
// high while the base timer count is below its duty entry, so an entry equal
// to the timer period gives 100 % and an entry of 0 gives 0 %; the PWM period
// is the base timer period. Comparing the timer with a micro_step-indexed
// table follows the controller description; the split into one rising and
// one falling generator sharing a table is this design's choice.
//
// Purely combinational; the outputs change in the cycle the count or
// micro_step changes.
module pwm_gen #(
  parameter int unsigned MICROSTEPS = 8,
  parameter int unsigned TW         = 16
) (
  input  logic [TW-1:0]                 count,
  input  logic [$clog2(MICROSTEPS)-1:0] micro_step,
  input  logic [TW-1:0]                 duty [MICROSTEPS+1],
  output logic                          pwm_rise,
  output logic                          pwm_fall
);

  localparam int unsigned IW = $clog2(MICROSTEPS + 1);

  logic [IW-1:0] idx_rise, idx_fall;

  always_comb begin
    idx_rise = IW'(micro_step);
    idx_fall = IW'(MICROSTEPS) - IW'(micro_step);
    pwm_rise = (count < duty[idx_rise]);
    pwm_fall = (count < duty[idx_fall]);
  end

endmodule
