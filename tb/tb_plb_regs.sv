// tb_plb_regs: checks reset values (timer modulo, quarter-sine duty table
// against $sin), write and read-back of every motion register and table
// entry, the one-cycle START/STOP action pulses, the read-only status words
// and the one-cycle acknowledge.
module tb_plb_regs;
  import stepper_pkg::*;
  localparam int unsigned M = 8, TW = 16, SW = 16, P = 34;
  logic              clk = 0, rst_n = 0;
  logic              bus_sel = 0, bus_we = 0;
  logic [7:0]        bus_addr = 0;
  logic [31:0]       bus_wdata = 0, bus_rdata;
  logic              bus_ack;
  motion_cfg_t       cfg;
  logic [TW-1:0]     timer_mod;
  logic [TW-1:0]     duty [M+1];
  logic              start_cmd, stop_cmd;
  run_state_e        state;
  logic [31:0]       step_count, delay;
  logic [2:0]        micro_step;
  logic [SW-1:0]     step_pos;
  logic              timer_clamped, div_busy;
  int checks = 0, failures = 0, starts = 0, stops = 0;

  plb_regs #(.MICROSTEPS(M), .TW(TW), .SW(SW), .DEF_PERIOD(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    starts += int'(start_cmd);
    stops  += int'(stop_cmd);
  end

  initial begin
    #1000000;
    failures++;
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
    check(bus_ack == 1'b1, "write ack");
  endtask

  task automatic bus_read(logic [5:0] wa, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = {wa, 2'b00};
    @(negedge clk);
    bus_sel = 0;
    check(bus_ack == 1'b1, "read ack");
    d = bus_rdata;
    @(negedge clk);
    check(bus_ack == 1'b0, "ack lasts one cycle");
  endtask

  initial begin
    logic [31:0] d, v [7];
    state = ST_ACCEL; step_count = 32'd77; micro_step = 3'd5; step_pos = 16'h1234;
    delay = 32'd999; timer_clamped = 1'b1; div_busy = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(timer_mod == TW'(P), "reset timer modulo");
    for (int k = 0; k <= M; k++) begin
      real e;
      e = P * $sin(k * 3.14159265358979 / (2.0 * M));
      check((real'(duty[k]) - e) <= 1.0 && (e - real'(duty[k])) <= 1.0,
            $sformatf("reset duty[%0d]=%0d vs %f", k, duty[k], e));
    end
    check(duty[0] == 0 && duty[M] == TW'(P), "duty table end points");
    // Motion registers
    for (int i = 0; i < 7; i++) v[i] = $urandom;
    bus_write(A_CTRL, 32'h1);
    bus_write(A_TIMER_MOD, v[0]);
    bus_write(A_C0, v[1]);
    bus_write(A_MIN_DELAY, v[2]);
    bus_write(A_STEPS, v[3]);
    bus_write(A_DECEL_START, v[4]);
    bus_write(A_DECEL_VAL, v[5]);
    check(cfg.dir == 1'b1 && cfg.c0 == v[1] && cfg.min_delay == v[2] && cfg.steps == v[3] &&
          cfg.decel_start == v[4] && cfg.decel_val == v[5] && timer_mod == v[0][15:0], "cfg outputs");
    bus_read(A_C0, d);          check(d == v[1], "read c0");
    bus_read(A_MIN_DELAY, d);   check(d == v[2], "read min_delay");
    bus_read(A_STEPS, d);       check(d == v[3], "read steps");
    bus_read(A_DECEL_START, d); check(d == v[4], "read decel_start");
    bus_read(A_DECEL_VAL, d);   check(d == v[5], "read decel_val");
    bus_read(A_TIMER_MOD, d);   check(d == {16'd0, v[0][15:0]}, "read timer modulo");
    bus_read(A_CTRL, d);        check(d == 32'h1, "read ctrl");
    // Duty table
    for (int k = 0; k <= M; k++) bus_write(A_DUTY_BASE + 6'(k), 32'(100 + k));
    for (int k = 0; k <= M; k++) begin
      check(duty[k] == TW'(100 + k), $sformatf("duty[%0d] output", k));
      bus_read(A_DUTY_BASE + 6'(k), d); check(d == 32'(100 + k), $sformatf("read duty[%0d]", k));
    end
    // Status words
    bus_read(A_STATUS, d);     check(d == 32'h0000_0301, $sformatf("status %h", d));
    bus_read(A_STEP_COUNT, d); check(d == 32'd77, "read step count");
    bus_read(A_POSITION, d);   check(d == 32'h1234_0005, "read position");
    bus_read(A_DELAY, d);      check(d == 32'd999, "read delay");
    // Action registers: one pulse per write, nothing else changes.
    check(starts == 0 && stops == 0, "no spurious actions");
    bus_write(A_START, 32'h0);
    repeat (2) @(negedge clk);
    check(starts == 1 && stops == 0, "start pulse");
    bus_write(A_STOP, 32'hFFFF_FFFF);
    repeat (2) @(negedge clk);
    check(starts == 1 && stops == 1, "stop pulse");
    check(cfg.c0 == v[1], "actions leave data registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
