// stepper_ref_pkg: reference model of a move, for the testbenches.
//
// Written as plain sequential code, apart from the RTL: given the motion
// parameters, it lists the state in which each micro-step is taken and the
// number of base-timer periods from the start of the move to that step, and
// the period count at which the controller returns to the stopped state.
// States: 0 stopped, 1 acceleration, 2 constant speed, 3 deceleration.
package stepper_ref_pkg;

  typedef struct {
    int unsigned step_time[$];   // timer periods from start to each step
    int unsigned step_state[$];  // state the step was taken in
    int unsigned stop_time;      // timer periods from start to stopped
    bit          trans[7];       // transitions 1..6 that the move makes
  } move_t;

  function automatic move_t ref_move(int unsigned c0_i, int unsigned min_delay_i,
                                     int unsigned steps_i, int unsigned decel_start_i,
                                     int unsigned decel_val_i);
    move_t m;
    longint unsigned c0, min_delay, steps, decel_start, decel_val;
    longint unsigned c, r, n, dn, cnt, t, last, q, num, den, cn, minc;
    int st;
    c0 = 64'(c0_i); min_delay = 64'(min_delay_i); steps = 64'(steps_i);
    decel_start = 64'(decel_start_i); decel_val = 64'(decel_val_i);
    for (int i = 0; i < 7; i++) m.trans[i] = 0;
    minc = (min_delay == 0) ? 1 : min_delay;
    if (steps == 1 || c0 <= min_delay) begin
      st = 2; c = minc; m.trans[5] = 1;
    end else begin
      st = 1; c = c0; m.trans[1] = 1;
    end
    last = minc; n = 0; r = 0; cnt = 0; t = 0; dn = 0;
    forever begin
      t += c;
      if (st == 3 && dn == 0) begin
        m.stop_time = int'(t); m.trans[4] = 1;
        break;
      end
      m.step_time.push_back(int'(t));
      m.step_state.push_back(st);
      cnt++;
      case (st)
        1: begin
          n++;
          num = 2 * c + r; den = 4 * n + 1;
          q = num / den; r = num % den;
          cn = (q >= c) ? 1 : c - q;
          if (cnt >= decel_start) begin
            st = 3; dn = decel_val; c = cn; m.trans[6] = 1;
          end else if (cn <= min_delay) begin
            last = cn; c = minc; r = 0; st = 2; m.trans[2] = 1;
          end else c = cn;
        end
        2: begin
          if (cnt >= decel_start) begin
            st = 3; dn = decel_val; c = last; r = 0; m.trans[3] = 1;
          end else c = minc;
        end
        default: begin
          dn--;
          if (dn != 0) begin
            num = 2 * c + r; den = 4 * dn - 1;
            q = num / den; r = num % den;
            c = c + q;
          end
        end
      endcase
    end
    return m;
  endfunction

  // Number of acceleration steps before the computed delay first reaches
  // min_delay (what a driver would use as the deceleration length of a
  // symmetric trapezoidal move). With small delays the integer ramp can
  // stall above min_delay; the search then gives up after 100000 steps.
  function automatic int unsigned accel_steps(int unsigned c0, int unsigned min_delay);
    longint unsigned c, r, n, num, q;
    c = 64'(c0); r = 0; n = 0;
    forever begin
      n++;
      num = 2 * c + r;
      q = num / (4 * n + 1); r = num % (4 * n + 1);
      c = (q >= c) ? 1 : c - q;
      if (c <= 64'(min_delay) || n >= 100000) return int'(n);
    end
  endfunction

endpackage
