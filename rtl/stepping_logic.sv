// stepping_logic: routes the two PWM signals to the motor's four winding
// outputs.
//
// The low two bits of the full-step counter select the winding that is being
// left (it receives the falling PWM signal); the next winding in order, modulo
// four, receives the rising signal and the other two are held low. Walking
// the step counter up therefore hands the current round the windings
// 0 -> 1 -> 2 -> 3 -> 0, and walking it down reverses the rotation. With a
// stopped motor the last pattern stays on, holding the shaft. Routing by the
// step counter follows the controller description; four outputs and this
// order are this design's reading of the four output traces it shows.
//
// Purely combinational.
module stepping_logic (
  input  logic [1:0] step_idx,
  input  logic       pwm_rise,
  input  logic       pwm_fall,
  output logic [3:0] winding
);

  logic [1:0] next_idx;

  always_comb begin
    next_idx          = step_idx + 2'd1;
    winding           = '0;
    winding[step_idx] = pwm_fall;
    winding[next_idx] = pwm_rise;
  end

endmodule
