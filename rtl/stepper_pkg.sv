// stepper_pkg: types and constants shared by the stepper controller peripheral.
//
// Holds the state encoding of the core state machine (stopped, acceleration,
// constant speed, deceleration), the word addresses of the bus registers and
// the configuration bundle that the register block hands to the core. The
// four states and their meaning follow the controller description; the binary
// encoding and the register map are this design's own choice.
package stepper_pkg;

  // Width of the delay arithmetic: the divider works on 32-bit numbers.
  localparam int unsigned DATA_W = 32;

  typedef enum logic [1:0] {
    ST_STOPPED = 2'd0,
    ST_ACCEL   = 2'd1,
    ST_RUN     = 2'd2,
    ST_DECEL   = 2'd3
  } run_state_e;

  // Register word addresses (byte address = word address * 4).
  localparam logic [5:0] A_CTRL        = 6'h00; // bit 0: direction (1 = reverse)
  localparam logic [5:0] A_TIMER_MOD   = 6'h01; // base timer period, clock cycles
  localparam logic [5:0] A_C0          = 6'h02; // first inter-step delay, timer periods
  localparam logic [5:0] A_MIN_DELAY   = 6'h03; // delay at maximal speed, timer periods
  localparam logic [5:0] A_STEPS       = 6'h04; // micro-steps to perform
  localparam logic [5:0] A_DECEL_START = 6'h05; // micro-step count at which deceleration begins
  localparam logic [5:0] A_DECEL_VAL   = 6'h06; // number of deceleration micro-steps
  localparam logic [5:0] A_START       = 6'h07; // action: any write starts a rotation
  localparam logic [5:0] A_STOP        = 6'h08; // action: any write stops at once
  localparam logic [5:0] A_STATUS      = 6'h09; // RO: [1:0] state, [8] busy, [9] timer modulo raised, [10] divider busy
  localparam logic [5:0] A_STEP_COUNT  = 6'h0A; // RO: micro-steps done in this rotation
  localparam logic [5:0] A_POSITION    = 6'h0B; // RO: [15:0] micro_step, [31:16] step counter
  localparam logic [5:0] A_DELAY       = 6'h0C; // RO: current inter-step delay, timer periods
  localparam logic [5:0] A_DUTY_BASE   = 6'h10; // duty table entries from here up

  // Motion parameters as written by the CPU.
  typedef struct packed {
    logic              dir;
    logic [DATA_W-1:0] c0;
    logic [DATA_W-1:0] min_delay;
    logic [DATA_W-1:0] steps;
    logic [DATA_W-1:0] decel_start;
    logic [DATA_W-1:0] decel_val;
  } motion_cfg_t;

endpackage
