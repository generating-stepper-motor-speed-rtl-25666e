// tb_stepper_periph: end-to-end test of the stepper peripheral at its default
// parameters, driven only through the register bus as the CPU driver would.
//
// Moves: a trapezoid, a triangle, a single step, an instant-speed move, a
// reverse move with a timer modulo below the 34-clock minimum, and a move cut
// short by STOP. For each move the spacing of step pulses (in clocks) is
// compared with the reference model times the timer period, the step count
// and position are read back, and the winding outputs are checked over one
// PWM period against the duty table for the final position. A move at top
// speed (one micro-step per 34-clock timer period) is included. A rewritten duty
// table is checked the same way. Every mechanism (transitions 1-6, STOP,
// timer modulo raised to 34, reverse direction, full-step advance, duty table
// rewrite) is counted and must occur.
module tb_stepper_periph;
  import stepper_pkg::*;
  import stepper_ref_pkg::*;
  localparam int unsigned M = 8;

  logic        clk = 0, rst_n = 0;
  logic        bus_sel = 0, bus_we = 0;
  logic [7:0]  bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic        bus_ack;
  logic [3:0]  winding;
  logic        step_pulse, dir;
  run_state_e  state;

  stepper_periph dut (.*);

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  longint unsigned pulses[$];
  run_state_e  state_q = ST_STOPPED;
  int          trans_cnt[7];
  int          n_stop = 0, n_clamp = 0, n_reverse = 0, n_fullstep = 0, n_table = 0;
  logic [31:0] duty_shadow [M+1];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (step_pulse) pulses.push_back(cyc);
    state_q <= state;
    if (rst_n && state != state_q)
      case ({state_q, state})
        {ST_STOPPED, ST_ACCEL}:   trans_cnt[1]++;
        {ST_ACCEL,   ST_RUN}:     trans_cnt[2]++;
        {ST_RUN,     ST_DECEL}:   trans_cnt[3]++;
        {ST_DECEL,   ST_STOPPED}: trans_cnt[4]++;
        {ST_STOPPED, ST_RUN}:     trans_cnt[5]++;
        {ST_ACCEL,   ST_DECEL}:   trans_cnt[6]++;
        default: ;
      endcase
  end

  initial begin
    #500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(logic [5:0] wa, logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = {wa, 2'b00}; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic bus_read(logic [5:0] wa, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = {wa, 2'b00};
    @(negedge clk);
    bus_sel = 0;
    d = bus_rdata;
  endtask

  // Winding outputs over one PWM period against the table at the held position.
  task automatic check_windings(string name, int unsigned period);
    logic [31:0] pos;
    int unsigned s, m, hi[4], e[4];
    bus_read(A_POSITION, pos);
    s = 32'(pos[31:16]) % 4; m = 32'(pos[15:0]);
    hi = '{0, 0, 0, 0};
    for (int c = 0; c < int'(period); c++) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) hi[w] += int'(winding[w]);
    end
    e = '{0, 0, 0, 0};
    e[s] = duty_shadow[M - m];
    e[(s + 1) % 4] += duty_shadow[m];
    for (int w = 0; w < 4; w++)
      check(hi[w] == e[w], $sformatf("%s: winding %0d high %0d of %0d clocks, expected %0d (step %0d, micro %0d)",
                                     name, w, hi[w], period, e[w], s, m));
  endtask

  task automatic run_move(string name, int unsigned period, int unsigned c0, int unsigned mind,
                          int unsigned steps, int unsigned ds, int unsigned dv, bit d);
    move_t       ref_m;
    logic [31:0] st, pos0, pos1;
    int          p0, p1, exp_p;
    ref_m = ref_move(c0, mind, steps, ds, dv);
    bus_read(A_POSITION, pos0);
    bus_write(A_TIMER_MOD, period);
    bus_write(A_CTRL, 32'(d));
    bus_write(A_C0, c0);
    bus_write(A_MIN_DELAY, mind);
    bus_write(A_STEPS, steps);
    bus_write(A_DECEL_START, ds);
    bus_write(A_DECEL_VAL, dv);
    pulses.delete();
    bus_write(A_START, 0);
    do bus_read(A_STATUS, st); while (st[8]);
    if (st[9]) n_clamp++;
    if (d) n_reverse++;
    check(pulses.size() == ref_m.step_time.size(),
          $sformatf("%s: %0d step pulses, expected %0d", name, pulses.size(), ref_m.step_time.size()));
    for (int i = 1; i < pulses.size() && i < ref_m.step_time.size(); i++)
      check(pulses[i] - pulses[i-1] == 64'(ref_m.step_time[i] - ref_m.step_time[i-1]) * 64'((period < 34) ? 34 : period),
            $sformatf("%s: step %0d after %0d clocks", name, i, pulses[i] - pulses[i-1]));
    bus_read(A_STEP_COUNT, st);
    check(st == steps, $sformatf("%s: step count %0d", name, st));
    bus_read(A_POSITION, pos1);
    p0 = int'(pos0[31:16]) * M + int'(pos0[15:0]);
    p1 = int'(pos1[31:16]) * M + int'(pos1[15:0]);
    exp_p = d ? p0 - int'(steps) : p0 + int'(steps);
    check(((p1 - exp_p) % (M * 65536)) == 0, $sformatf("%s: position %0d, expected %0d", name, p1, exp_p));
    if (pos1[31:16] != pos0[31:16]) n_fullstep++;
    check_windings(name, (period < 34) ? 34 : period);
    $display("%s: %0d steps, %0d clocks", name, pulses.size(),
             (pulses.size() > 0) ? pulses[pulses.size()-1] - pulses[0] : 0);
  endtask

  initial begin
    int unsigned na;
    logic [31:0] st;
    foreach (trans_cnt[i]) trans_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k <= M; k++) bus_read(A_DUTY_BASE + 6'(k), duty_shadow[k]);
    check(duty_shadow[0] == 0 && duty_shadow[M] == 34, "reset duty table spans 0..34");
    check_windings("at reset", 34);

    na = accel_steps(300, 25);
    run_move("trapezoid", 40, 300, 25, 3 * na, 2 * na, na, 0);
    run_move("triangle", 34, 150, 4, 30, 15, 15, 0);
    run_move("single", 34, 80, 10, 1, 0, 0, 0);
    run_move("instant", 50, 8, 12, 20, 20, 0, 0);
    na = accel_steps(100, 20);
    run_move("reverse, modulo 10", 10, 100, 20, 2 * na + 7, na + 7, na, 1);

    // Top speed: one micro-step per 34-clock timer period, the divider
    // finishing within every period.
    run_move("top speed", 34, 1, 1, 64, 64, 0, 0);
    check(pulses.size() == 64 && pulses[40] - pulses[39] == 34, "top speed: one step per 34 clocks");

    // New duty table (full-step drive levels) and a short move with it.
    for (int k = 0; k <= M; k++) begin
      duty_shadow[k] = (k == 0) ? 0 : 20 + k;
      bus_write(A_DUTY_BASE + 6'(k), duty_shadow[k]);
    end
    n_table++;
    run_move("new table", 40, 60, 10, 13, 8, 5, 0);

    // STOP during constant speed.
    bus_write(A_TIMER_MOD, 34);
    bus_write(A_C0, 5); bus_write(A_MIN_DELAY, 5); bus_write(A_STEPS, 10000);
    bus_write(A_DECEL_START, 9999); bus_write(A_DECEL_VAL, 1);
    pulses.delete();
    bus_write(A_START, 0);
    repeat (2000) @(negedge clk);
    bus_write(A_STOP, 0);
    @(negedge clk);
    bus_read(A_STATUS, st);
    check(st[8] == 0 && state == ST_STOPPED, "STOP halts the motor");
    begin
      int np;
      np = pulses.size();
      repeat (1000) @(negedge clk);
      check(pulses.size() == np && np > 0, "no step pulses after STOP");
      if (pulses.size() == np && np > 0) n_stop++;
    end

    for (int t = 1; t <= 6; t++) check(trans_cnt[t] > 0, $sformatf("transition %0d happened %0d times", t, trans_cnt[t]));
    check(n_stop > 0, "STOP action");
    check(n_clamp > 0, "timer modulo raised to minimum");
    check(n_reverse > 0, "reverse direction");
    check(n_fullstep > 0, "full-step advance");
    check(n_table > 0, "duty table rewrite");
    $display("mechanisms: t1=%0d t2=%0d t3=%0d t4=%0d t5=%0d t6=%0d stop=%0d clamp=%0d reverse=%0d fullstep=%0d table=%0d",
             trans_cnt[1], trans_cnt[2], trans_cnt[3], trans_cnt[4], trans_cnt[5], trans_cnt[6],
             n_stop, n_clamp, n_reverse, n_fullstep, n_table);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
