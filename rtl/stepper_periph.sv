// stepper_periph: linear-speed-profile stepper motor controller peripheral.
//
// A CPU computes, once per move, the first inter-step delay c0, the delay at
// maximal speed, the number of micro-steps and where deceleration begins, and
// writes them over the bus. From then on this peripheral runs the whole move
// without the CPU: the base timer sets the time grain, the core state machine
// walks through acceleration, constant speed and deceleration and updates the
// inter-step delay after every micro-step with the divider, and the PWM
// generators and stepping logic turn the micro_step and step counters into
// four PWM-modulated winding drive signals.
//
//   bus --> plb_regs --cfg/start/stop--> core_fsm <--> divider (prio_enc x2)
//   periph_timer --tick--> core_fsm --micro_step--> pwm_gen --> stepping_logic
//   periph_timer --count--> pwm_gen                core_fsm --step--^
//
// This block structure follows the controller description; all widths,
// the bus handshake and the register map are this design's choices (see the
// sub-modules). Ports: the register bus (see plb_regs), the four winding
// outputs, a one-clock step_pulse and dir for an external step/direction
// driver, and the run state for observation. Everything runs on clk.
module stepper_periph
  import stepper_pkg::*;
#(
  parameter int unsigned MICROSTEPS = 8,
  parameter int unsigned TW         = 16,
  parameter int unsigned SW         = 16,
  parameter int unsigned MIN_PERIOD = 34,
  parameter int unsigned DEF_PERIOD = 34
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,
  output logic [3:0]  winding,
  output logic        step_pulse,
  output logic        dir,
  output run_state_e  state
);

  localparam int unsigned MW = $clog2(MICROSTEPS);

  motion_cfg_t       cfg;
  logic [TW-1:0]     timer_mod, count;
  logic [TW-1:0]     duty [MICROSTEPS+1];
  logic              start_cmd, stop_cmd, tick, timer_clear, clamped;
  logic              div_start, div_done, div_busy;
  logic [DATA_W-1:0] div_num, div_den, div_quot, div_rem;
  logic [MW-1:0]     micro_step;
  logic [SW-1:0]     step_pos;
  logic [DATA_W-1:0] step_count, delay;
  logic              pwm_rise, pwm_fall;

  plb_regs #(
    .MICROSTEPS(MICROSTEPS), .TW(TW), .SW(SW), .DEF_PERIOD(DEF_PERIOD)
  ) u_regs (
    .clk, .rst_n,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .cfg, .timer_mod, .duty, .start_cmd, .stop_cmd,
    .state, .step_count, .micro_step, .step_pos, .delay,
    .timer_clamped(clamped), .div_busy
  );

  periph_timer #(.TW(TW), .MIN_PERIOD(MIN_PERIOD)) u_timer (
    .clk, .rst_n, .clear(timer_clear), .modulo(timer_mod),
    .count, .tick, .clamped
  );

  core_fsm #(.MICROSTEPS(MICROSTEPS), .SW(SW)) u_core (
    .clk, .rst_n, .tick, .cfg, .start_cmd, .stop_cmd,
    .div_start, .div_num, .div_den, .div_done, .div_quot, .div_rem,
    .state, .timer_clear, .step_pulse, .dir, .micro_step, .step_pos,
    .step_count, .delay
  );

  divider #(.W(DATA_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_quot), .rem(div_rem)
  );

  pwm_gen #(.MICROSTEPS(MICROSTEPS), .TW(TW)) u_pwm (
    .count, .micro_step, .duty, .pwm_rise, .pwm_fall
  );

  stepping_logic u_step (
    .step_idx(step_pos[1:0]), .pwm_rise, .pwm_fall, .winding
  );

endmodule
