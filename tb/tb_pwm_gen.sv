// tb_pwm_gen: loads a random duty table and, for every micro_step, sweeps the
// timer count over a whole PWM period, checking that the rising output is
// high for exactly duty[micro_step] counts and the falling output for exactly
// duty[MICROSTEPS - micro_step] counts, and high only at the start.
module tb_pwm_gen;
  localparam int unsigned M  = 8;
  localparam int unsigned TW = 16;
  localparam int unsigned P  = 50;
  logic [TW-1:0] count;
  logic [2:0]    micro_step;
  logic [TW-1:0] duty [M+1];
  logic          pwm_rise, pwm_fall;
  int checks = 0, failures = 0;

  pwm_gen #(.MICROSTEPS(M), .TW(TW)) dut (.count, .micro_step, .duty, .pwm_rise, .pwm_fall);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 4; round++) begin
      for (int k = 0; k <= M; k++) duty[k] = TW'($urandom % (P + 1));
      if (round == 0) begin duty[0] = 0; duty[M] = TW'(P); end
      for (int m = 0; m < M; m++) begin
        int hr, hf;
        hr = 0; hf = 0;
        micro_step = 3'(m);
        for (int c = 0; c < P; c++) begin
          count = TW'(c);
          #1;
          hr += pwm_rise; hf += pwm_fall;
          checks++;
          if (pwm_rise != (c < int'(duty[m])) || pwm_fall != (c < int'(duty[M - m]))) begin
            failures++;
            $display("FAIL m=%0d count=%0d rise=%0b fall=%0b", m, c, pwm_rise, pwm_fall);
          end
        end
        checks++;
        if (hr != int'(duty[m]) || hf != int'(duty[M - m])) begin
          failures++; $display("FAIL m=%0d high counts %0d/%0d", m, hr, hf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
