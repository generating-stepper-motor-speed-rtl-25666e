// tb_stepping_logic: for every step index and every pair of PWM levels,
// checks that the falling signal goes to winding (step mod 4), the rising one
// to the next winding round the ring, and the other two stay low.
module tb_stepping_logic;
  logic [1:0] step_idx;
  logic       pwm_rise, pwm_fall;
  logic [3:0] winding;
  int checks = 0, failures = 0;

  stepping_logic dut (.step_idx, .pwm_rise, .pwm_fall, .winding);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 4; p++) begin
        logic [3:0] exp_w;
        step_idx = 2'(s); pwm_rise = p[0]; pwm_fall = p[1];
        exp_w = '0;
        if (pwm_fall) exp_w |= 4'b0001 << s;
        if (pwm_rise) exp_w |= 4'b0001 << ((s + 1) % 4);
        #1;
        checks++;
        if (winding !== exp_w) begin
          failures++; $display("FAIL step=%0d rise=%0b fall=%0b winding=%b exp=%b", s, pwm_rise, pwm_fall, winding, exp_w);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
