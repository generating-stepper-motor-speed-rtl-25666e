// core_fsm: peripheral core state machine of the stepper controller.
//
// Four states: stopped, acceleration, constant speed and deceleration. While
// the motor runs, the machine counts base-timer overflows (tick); when the
// current inter-step delay c has elapsed it issues one micro-step, advances
// the micro_step counter (whose wrap advances the full-step counter that picks
// the windings) and starts the divider on the delay for the following step.
// Delays follow the linear-ramp recurrence
//     acceleration:  c_n = c_(n-1) - (2 c_(n-1) + r) / (4n + 1)
//     deceleration:  c   = c       + (2 c       + r) / (4m - 1)
// where n counts acceleration steps, m is the number of deceleration steps
// still to go and r carries the remainder of the previous division so that
// rounding errors do not accumulate. The recurrence settles on the exact
// square-root law only if the first delay is scaled by 0.676, which the CPU
// does when it writes c0. The recurrence and the six transitions
// are those of the controller description:
//   1 stopped -> acceleration   start, ramped profile
//   2 acceleration -> constant  computed delay reached min_delay
//   3 constant -> deceleration  step count reached decel_start
//   4 deceleration -> stopped   all deceleration steps done
//   5 stopped -> constant       start, single step or c0 <= min_delay
//   6 acceleration -> deceleration  decel_start reached before full speed
// State changes take effect only in a tick cycle. Carrying the remainder,
// resuming deceleration from the last acceleration delay, and the exact step
// accounting below are this design's own choices, made to match the way the
// CPU driver computes decel_start and decel_val.
//
// Step accounting: the step that brings the count to decel_start is still
// taken in the acceleration or constant-speed state; then decel_val further
// steps are taken in deceleration, and one delay after the last of them the
// machine stops (transition 4, no step). A rotation therefore makes
// decel_start + decel_val micro-steps; the driver sets decel_start =
// steps - decel_val.
//
// Timing: start_cmd and stop_cmd are one-cycle pulses. start_cmd is obeyed in
// the stopped state only and also clears the base timer, so the first step
// comes c0 (or min_delay) whole timer periods later. stop_cmd halts at once
// from any state, an addition to the six transitions. step_pulse is high for
// one clock in the tick cycle of each step. The divider is started in that
// cycle and its result is taken over when it reports done, at most 34 clocks
// later, which is why the base timer period is at least 34 clocks; the
// assertion below checks that a result never arrives late.
module core_fsm
  import stepper_pkg::*;
#(
  parameter int unsigned MICROSTEPS = 8,
  parameter int unsigned SW         = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tick,
  input  motion_cfg_t                   cfg,
  input  logic                          start_cmd,
  input  logic                          stop_cmd,
  // divider
  output logic                          div_start,
  output logic [DATA_W-1:0]             div_num,
  output logic [DATA_W-1:0]             div_den,
  input  logic                          div_done,
  input  logic [DATA_W-1:0]             div_quot,
  input  logic [DATA_W-1:0]             div_rem,
  // status and outputs
  output run_state_e                    state,
  output logic                          timer_clear,
  output logic                          step_pulse,
  output logic                          dir,
  output logic [$clog2(MICROSTEPS)-1:0] micro_step,
  output logic [SW-1:0]                 step_pos,
  output logic [DATA_W-1:0]             step_count,
  output logic [DATA_W-1:0]             delay
);

  localparam int unsigned MW = $clog2(MICROSTEPS);
  localparam logic [MW-1:0] M_LAST = MW'(MICROSTEPS - 1);

  typedef enum logic [1:0] {
    CK_ACCEL,        // acceleration step; may end the ramp (transition 2)
    CK_ACCEL_LAST,   // acceleration formula, deceleration already decided
    CK_DECEL
  } calc_kind_e;

  logic [DATA_W-1:0] c_r, rest_r, n_acc, dn, last_accel, elapsed;
  logic              calc_pending, go_run;
  calc_kind_e        calc_kind;

  run_state_e eff_state;  // state with a pending transition 2 already applied
  logic due, stop_now, step_fire;
  logic [DATA_W-1:0] sc1, n1, dn1;
  logic [DATA_W-1:0] acc_next, dec_next;

  assign delay = c_r;

  always_comb begin
    eff_state = go_run ? ST_RUN : state;
    due       = tick && (state != ST_STOPPED) && !calc_pending && (elapsed + 1'b1 >= c_r);
    stop_now  = due && (eff_state == ST_DECEL) && (dn == '0);
    step_fire = due && !stop_now;
    sc1       = step_count + 1'b1;
    n1        = n_acc + 1'b1;
    dn1       = dn - 1'b1;
    // Operands for the delay of the next step.
    div_num   = {c_r[DATA_W-2:0], 1'b0} + rest_r;
    div_den   = (eff_state == ST_DECEL) ? {dn1[DATA_W-3:0], 2'b00} - 1'b1
                                    : {n1[DATA_W-3:0], 2'b00} + 1'b1;
    div_start = step_fire && ((eff_state == ST_ACCEL) || (eff_state == ST_DECEL && dn1 != '0));
    // Results; a delay never drops below one timer period.
    acc_next  = (div_quot >= c_r) ? DATA_W'(1) : c_r - div_quot;
    dec_next  = c_r + div_quot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_STOPPED;
      c_r          <= '0;
      rest_r       <= '0;
      n_acc        <= '0;
      dn           <= '0;
      last_accel   <= '0;
      elapsed      <= '0;
      calc_pending <= 1'b0;
      calc_kind    <= CK_ACCEL;
      go_run       <= 1'b0;
      step_count   <= '0;
      micro_step   <= '0;
      step_pos     <= '0;
      dir          <= 1'b0;
      step_pulse   <= 1'b0;
      timer_clear  <= 1'b0;
    end else begin
      step_pulse  <= 1'b0;
      timer_clear <= 1'b0;

      if (stop_cmd) begin
        state        <= ST_STOPPED;
        calc_pending <= 1'b0;
        go_run       <= 1'b0;
      end else if (state == ST_STOPPED) begin
        if (start_cmd && cfg.steps != '0) begin
          dir          <= cfg.dir;
          step_count   <= '0;
          n_acc        <= '0;
          rest_r       <= '0;
          elapsed      <= '0;
          calc_pending <= 1'b0;
          go_run       <= 1'b0;
          timer_clear  <= 1'b1;
          if (cfg.steps == DATA_W'(1) || cfg.c0 <= cfg.min_delay) begin
            state      <= ST_RUN;                       // transition 5
            c_r        <= (cfg.min_delay == '0) ? DATA_W'(1) : cfg.min_delay;
            last_accel <= (cfg.min_delay == '0) ? DATA_W'(1) : cfg.min_delay;
          end else begin
            state      <= ST_ACCEL;                     // transition 1
            c_r        <= cfg.c0;
          end
        end
      end else begin
        // Result of the delay computation started at the last step.
        if (calc_pending && div_done) begin
          calc_pending <= 1'b0;
          rest_r       <= div_rem;
          unique case (calc_kind)
            CK_ACCEL: begin
              if (acc_next <= cfg.min_delay) begin
                last_accel <= acc_next;
                c_r        <= (cfg.min_delay == '0) ? DATA_W'(1) : cfg.min_delay;
                rest_r     <= '0;
                go_run     <= 1'b1;                     // taken at next tick
              end else begin
                c_r <= acc_next;
              end
            end
            CK_ACCEL_LAST: c_r <= acc_next;
            default:       c_r <= dec_next;
          endcase
        end

        if (tick) begin
          if (go_run) begin
            state  <= ST_RUN;                           // transition 2
            go_run <= 1'b0;
          end
          if (!due) begin
            if (elapsed != '1) elapsed <= elapsed + 1'b1;
          end else begin
            elapsed <= '0;
          end
        end

        if (stop_now) begin
          state <= ST_STOPPED;                          // transition 4
        end

        if (step_fire) begin
          step_pulse <= 1'b1;
          step_count <= sc1;
          // Micro-step counter; its wrap moves the full-step counter.
          if (!dir) begin
            if (micro_step == M_LAST) begin
              micro_step <= '0;
              step_pos   <= step_pos + 1'b1;
            end else begin
              micro_step <= micro_step + 1'b1;
            end
          end else begin
            if (micro_step == '0) begin
              micro_step <= M_LAST;
              step_pos   <= step_pos - 1'b1;
            end else begin
              micro_step <= micro_step - 1'b1;
            end
          end

          unique case (eff_state)
            ST_ACCEL: begin
              n_acc        <= n1;
              calc_pending <= 1'b1;
              if (sc1 >= cfg.decel_start) begin
                state     <= ST_DECEL;                  // transition 6
                dn        <= cfg.decel_val;
                calc_kind <= CK_ACCEL_LAST;
              end else begin
                calc_kind <= CK_ACCEL;
              end
            end
            ST_RUN: begin
              if (sc1 >= cfg.decel_start) begin
                state  <= ST_DECEL;                     // transition 3
                dn     <= cfg.decel_val;
                c_r    <= last_accel;
                rest_r <= '0;
              end else begin
                c_r <= (cfg.min_delay == '0) ? DATA_W'(1) : cfg.min_delay;
              end
            end
            default: begin                              // ST_DECEL, dn != 0
              dn <= dn1;
              if (dn1 != '0) begin
                calc_pending <= 1'b1;
                calc_kind    <= CK_DECEL;
              end
            end
          endcase
        end
      end
    end
  end

  // The next delay must be known before the timer overflows again.
  a_result_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    (tick && state != ST_STOPPED) |-> !calc_pending)
    else $error("delay computation still running at timer overflow");

endmodule
