// tb_core_fsm: runs the core state machine with the real base timer and
// divider through the move shapes of the controller: trapezoid (transitions
// 1, 2, 3, 4), triangle (1, 6, 4), single step and instant full speed (5, 3,
// 4), a reverse move and an immediate stop. For each move it compares, step
// by step, the number of timer periods from start to step with the reference
// model, the transitions taken, the stop time, the step count and the final
// micro-step position, and checks that the state changes only in a timer
// overflow cycle (or on a start/stop command).
module tb_core_fsm;
  import stepper_pkg::*;
  import stepper_ref_pkg::*;
  localparam int unsigned M = 8, SW = 16, TW = 16, P = 34;

  logic              clk = 0, rst_n = 0;
  logic              tick, timer_clear, clamped;
  logic [TW-1:0]     count;
  motion_cfg_t       cfg;
  logic              start_cmd = 0, stop_cmd = 0;
  logic              div_start, div_done, div_busy;
  logic [DATA_W-1:0] div_num, div_den, div_quot, div_rem;
  run_state_e        state;
  logic              step_pulse, dir;
  logic [2:0]        micro_step;
  logic [SW-1:0]     step_pos;
  logic [DATA_W-1:0] step_count, delay;

  periph_timer #(.TW(TW), .MIN_PERIOD(34)) u_timer (
    .clk, .rst_n, .clear(timer_clear), .modulo(TW'(P)), .count, .tick, .clamped);
  divider #(.W(DATA_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_quot), .rem(div_rem));
  core_fsm #(.MICROSTEPS(M), .SW(SW)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned tickn = 0;
  int unsigned steps_seen[$];
  int unsigned stop_seen;
  bit          trans_seen[7];
  logic        tick_q = 0, cmd_q = 0;
  run_state_e  state_q = ST_STOPPED;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (tick && state != ST_STOPPED) tickn <= tickn + 1;
    if (step_pulse) steps_seen.push_back(tickn);
    if (state != state_q) begin
      checks++;
      if (!(tick_q || cmd_q)) begin
        failures++; $display("FAIL state change %0d->%0d outside a timer overflow", state_q, state);
      end
      case ({state_q, state})
        {ST_STOPPED, ST_ACCEL}: trans_seen[1] = 1;
        {ST_ACCEL,   ST_RUN}:   trans_seen[2] = 1;
        {ST_RUN,     ST_DECEL}: trans_seen[3] = 1;
        {ST_DECEL,   ST_STOPPED}: begin trans_seen[4] = 1; stop_seen = tickn; end
        {ST_STOPPED, ST_RUN}:   trans_seen[5] = 1;
        {ST_ACCEL,   ST_DECEL}: trans_seen[6] = 1;
        default: ;
      endcase
    end
    state_q <= state;
    tick_q  <= tick;
    cmd_q   <= start_cmd || stop_cmd;
  end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_move(string name, int unsigned c0, int unsigned mind, int unsigned steps,
                          int unsigned ds, int unsigned dv, bit d);
    move_t ref_m;
    int    pos0, pos1, exp_pos;
    ref_m = ref_move(c0, mind, steps, ds, dv);
    @(negedge clk);
    cfg.c0 = c0; cfg.min_delay = mind; cfg.steps = steps; cfg.decel_start = ds;
    cfg.decel_val = dv; cfg.dir = d;
    pos0 = int'(step_pos) * M + int'(micro_step);
    steps_seen.delete();
    foreach (trans_seen[i]) trans_seen[i] = 0;
    stop_seen = 0;
    tickn = 0;
    start_cmd = 1;
    @(negedge clk);
    start_cmd = 0;
    @(negedge clk);
    while (state != ST_STOPPED) @(negedge clk);
    @(negedge clk);   // let the monitor see the last state change
    check(steps_seen.size() == ref_m.step_time.size(),
          $sformatf("%s: %0d steps, expected %0d", name, steps_seen.size(), ref_m.step_time.size()));
    check(step_count == ref_m.step_time.size(), $sformatf("%s: step_count %0d", name, step_count));
    for (int i = 0; i < steps_seen.size() && i < ref_m.step_time.size(); i++)
      check(steps_seen[i] == ref_m.step_time[i],
            $sformatf("%s: step %0d at period %0d, expected %0d", name, i, steps_seen[i], ref_m.step_time[i]));
    check(stop_seen == ref_m.stop_time, $sformatf("%s: stopped at %0d, expected %0d", name, stop_seen, ref_m.stop_time));
    for (int t = 1; t <= 6; t++)
      check(trans_seen[t] == ref_m.trans[t], $sformatf("%s: transition %0d seen=%0b expected=%0b", name, t, trans_seen[t], ref_m.trans[t]));
    pos1 = int'(step_pos) * M + int'(micro_step);
    exp_pos = d ? pos0 - int'(steps) : pos0 + int'(steps);
    check(((pos1 - exp_pos) % (M * (1 << SW))) == 0, $sformatf("%s: position %0d, expected %0d", name, pos1, exp_pos));
    $display("%s: %0d steps in %0d timer periods", name, steps_seen.size(), stop_seen);
  endtask

  initial begin
    int unsigned na;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // Trapezoid: full speed reached, symmetric ramps.
    na = accel_steps(200, 20);
    run_move("trapezoid", 200, 20, 300, 300 - na, na, 0);
    // Triangle: deceleration before full speed.
    run_move("triangle", 200, 5, 40, 20, 20, 0);
    // Reverse trapezoid with a short plateau.
    na = accel_steps(120, 30);
    run_move("reverse", 120, 30, 2 * na + 5, na + 5, na, 1);
    // Single step and instant full speed.
    run_move("single", 50, 10, 1, 0, 0, 0);
    run_move("instant", 10, 20, 50, 50, 0, 0);
    // Immediate stop during acceleration.
    @(negedge clk);
    cfg.c0 = 100; cfg.min_delay = 2; cfg.steps = 1000; cfg.decel_start = 500; cfg.decel_val = 500; cfg.dir = 0;
    start_cmd = 1;
    @(negedge clk);
    start_cmd = 0;
    while (step_count < 5) @(negedge clk);
    stop_cmd = 1;
    @(negedge clk);
    stop_cmd = 0;
    check(state == ST_STOPPED, "stop command halts at once");
    begin
      int unsigned sc;
      sc = step_count;
      repeat (20000) @(negedge clk);
      check(step_count == sc && state == ST_STOPPED, "no steps after stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
