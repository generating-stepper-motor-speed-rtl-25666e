// tb_ramp_accuracy: measures how closely the peripheral's linear speed ramp
// follows the exact square-root law.
//
// The exact inter-step delays of a constant-acceleration start are
//     d_n = C0 * (sqrt(n+1) - sqrt(n))          (n = 0, 1, 2, ...)
// in timer periods, with C0 = sqrt(2*alpha/accel) / t_timer. The hardware's
// recurrence c_n = c_(n-1) - 2 c_(n-1) / (4n+1) starts too slowly unless the
// first delay is compensated: the driver writes c0 = 0.676 * C0. This bench
// writes C0 = 5000 compensated that way, a maximal-speed delay of 46 periods
// and a symmetric deceleration, runs the move through the register bus and
// measures every step interval in clocks. From the third step on, each
// acceleration interval must be within 2.5 % + 1 period of d_n, and each
// deceleration interval within the same bound of the acceleration interval it
// mirrors (the k-th from the end against the (k-1)-th from the start). Reports the worst error seen.
module tb_ramp_accuracy;
  import stepper_pkg::*;
  import stepper_ref_pkg::*;
  localparam int unsigned PER = 34;
  localparam real         C0  = 5000.0;

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

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (step_pulse) pulses.push_back(cyc);
  end

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(logic [5:0] wa, logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = {wa, 2'b00}; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  initial begin
    int unsigned c0c, na, total, nd;
    real worst_acc, worst_dec;
    worst_acc = 0.0; worst_dec = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    c0c = int'(0.676 * C0);
    na  = accel_steps(c0c, 46);
    total = 2 * na + 50;
    bus_write(A_TIMER_MOD, PER);
    bus_write(A_C0, c0c);
    bus_write(A_MIN_DELAY, 46);
    bus_write(A_STEPS, total);
    bus_write(A_DECEL_START, total - na);
    bus_write(A_DECEL_VAL, na);
    bus_write(A_START, 0);
    @(negedge clk);
    while (state != ST_STOPPED) @(negedge clk);
    checks++;
    if (pulses.size() != total) begin failures++; $display("FAIL %0d steps, expected %0d", pulses.size(), total); end
    nd = pulses.size();
    // Interval i (i >= 1) is the delay before step i, exact value d_i.
    for (int i = 3; i <= int'(na) && i < int'(nd); i++) begin
      real meas, ex, err;
      meas = real'(pulses[i] - pulses[i-1]) / PER;
      ex   = C0 * ($sqrt(real'(i + 1)) - $sqrt(real'(i)));
      err  = (meas - ex) / ex;
      if (err < 0) err = -err;
      if (err > worst_acc) worst_acc = err;
      checks++;
      if (meas > ex * 1.025 + 1.0 || meas < ex * 0.975 - 1.0) begin
        failures++; $display("FAIL accel step %0d: %f periods, exact %f", i, meas, ex);
      end
    end
    // Deceleration mirrors acceleration: the k-th interval from the end
    // matches acceleration interval k-1.
    for (int k = 3; k <= int'(na) - 1; k++) begin
      real dec, acc, err;
      dec = real'(pulses[nd - k] - pulses[nd - k - 1]) / PER;
      acc = real'(pulses[k - 1] - pulses[k - 2]) / PER;
      err = (dec - acc) / acc;
      if (err < 0) err = -err;
      if (err > worst_dec) worst_dec = err;
      checks++;
      if (dec > acc * 1.025 + 1.0 || dec < acc * 0.975 - 1.0) begin
        failures++; $display("FAIL decel interval %0d from end: %f periods, accel %f", k, dec, acc);
      end
    end
    $display("%0d accel steps, worst delay error vs exact %.2f %%, worst decel/accel mismatch %.2f %%",
             na, worst_acc * 100.0, worst_dec * 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
