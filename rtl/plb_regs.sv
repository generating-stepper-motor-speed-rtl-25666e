// plb_regs: processor-bus register interface of the stepper peripheral.
//
// Gives the CPU memory-mapped access to everything that parameterises a
// rotation: direction, base timer modulo, first delay c0, delay at maximal
// speed, number of micro-steps, the step at which deceleration starts, the
// number of deceleration steps, and the PWM duty table indexed by micro_step.
// Two further addresses are action registers: a write of any value to START
// or STOP produces a one-clock start_cmd or stop_cmd pulse. Status (state,
// busy, timer modulo raised to its minimum, divider busy), step count,
// current delay and position read back. The register contents and the action
// registers follow the controller description; the address map (see
// stepper_pkg), reset values and the bus handshake are this design's own.
//
// Bus: a simple synchronous slave standing in for the processor local bus.
// A transfer is presented with bus_sel high for one cycle; writes take effect
// on that clock edge, and bus_ack plus bus_rdata are valid in the following
// cycle. bus_addr is a byte address whose low two bits are ignored.
//
// Reset values: timer modulo DEF_PERIOD clocks, duty table a quarter sine
// wave scaled to DEF_PERIOD, entry k = round(DEF_PERIOD * sin(k*90deg/
// MICROSTEPS)), evaluated with Bhaskara's rational sine approximation
// (error below 0.2 %) so that no real arithmetic is needed. Motion registers
// reset to zero.
module plb_regs
  import stepper_pkg::*;
#(
  parameter int unsigned MICROSTEPS = 8,
  parameter int unsigned TW         = 16,
  parameter int unsigned SW         = 16,
  parameter int unsigned DEF_PERIOD = 34
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // bus
  input  logic                          bus_sel,
  input  logic                          bus_we,
  input  logic [7:0]                    bus_addr,
  input  logic [31:0]                   bus_wdata,
  output logic [31:0]                   bus_rdata,
  output logic                          bus_ack,
  // to the core
  output motion_cfg_t                   cfg,
  output logic [TW-1:0]                 timer_mod,
  output logic [TW-1:0]                 duty [MICROSTEPS+1],
  output logic                          start_cmd,
  output logic                          stop_cmd,
  // status from the core
  input  run_state_e                    state,
  input  logic [DATA_W-1:0]             step_count,
  input  logic [$clog2(MICROSTEPS)-1:0] micro_step,
  input  logic [SW-1:0]                 step_pos,
  input  logic [DATA_W-1:0]             delay,
  input  logic                          timer_clamped,
  input  logic                          div_busy
);

  localparam int unsigned NT = MICROSTEPS + 1;

  // round(p * sin(k * 90deg / m)), Bhaskara I: sin x ~ 4x(180-x) / (40500 - x(180-x))
  function automatic logic [TW-1:0] sine_duty(int unsigned k, int unsigned m, int unsigned p);
    longint num, den, xx;
    xx  = 90 * longint'(k);
    num = 4 * xx * (180 * longint'(m) - xx);
    den = 40500 * longint'(m) * longint'(m) - xx * (180 * longint'(m) - xx);
    return TW'((2 * longint'(p) * num + den) / (2 * den));
  endfunction

  logic [5:0] waddr;
  assign waddr = bus_addr[7:2];

  logic wr;
  assign wr = bus_sel && bus_we;

  // Duty table entry addressed, and whether the address falls in the table.
  localparam int unsigned DIW = $clog2(NT);
  logic [5:0]     doff;
  logic [DIW-1:0] didx;
  logic           in_table;
  assign doff     = waddr - A_DUTY_BASE;
  assign didx     = DIW'(doff);
  assign in_table = (waddr >= A_DUTY_BASE) && (doff < 6'(NT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '0;
      timer_mod <= TW'(DEF_PERIOD);
      for (int unsigned k = 0; k < NT; k++) duty[k] <= sine_duty(k, MICROSTEPS, DEF_PERIOD);
      start_cmd <= 1'b0;
      stop_cmd  <= 1'b0;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      start_cmd <= 1'b0;
      stop_cmd  <= 1'b0;
      bus_ack   <= bus_sel;
      if (wr) begin
        unique case (waddr)
          A_CTRL:        cfg.dir         <= bus_wdata[0];
          A_TIMER_MOD:   timer_mod       <= bus_wdata[TW-1:0];
          A_C0:          cfg.c0          <= bus_wdata;
          A_MIN_DELAY:   cfg.min_delay   <= bus_wdata;
          A_STEPS:       cfg.steps       <= bus_wdata;
          A_DECEL_START: cfg.decel_start <= bus_wdata;
          A_DECEL_VAL:   cfg.decel_val   <= bus_wdata;
          A_START:       start_cmd       <= 1'b1;
          A_STOP:        stop_cmd        <= 1'b1;
          default: begin
            if (in_table) duty[didx] <= bus_wdata[TW-1:0];
          end
        endcase
      end
      if (bus_sel && !bus_we) begin
        unique case (waddr)
          A_CTRL:        bus_rdata <= {31'd0, cfg.dir};
          A_TIMER_MOD:   bus_rdata <= 32'(timer_mod);
          A_C0:          bus_rdata <= cfg.c0;
          A_MIN_DELAY:   bus_rdata <= cfg.min_delay;
          A_STEPS:       bus_rdata <= cfg.steps;
          A_DECEL_START: bus_rdata <= cfg.decel_start;
          A_DECEL_VAL:   bus_rdata <= cfg.decel_val;
          A_STATUS:      bus_rdata <= {21'd0, div_busy, timer_clamped, state != ST_STOPPED, 6'd0, state};
          A_STEP_COUNT:  bus_rdata <= step_count;
          A_DELAY:       bus_rdata <= delay;
          A_POSITION:    bus_rdata <= {16'(step_pos), 16'(micro_step)};
          default: begin
            bus_rdata <= in_table ? 32'(duty[didx]) : '0;
          end
        endcase
      end
    end
  end

endmodule
