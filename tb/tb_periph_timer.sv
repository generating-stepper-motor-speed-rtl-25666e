// tb_periph_timer: checks the base timer's count sequence and the spacing of
// its overflow ticks for a normal modulo, for modulos below the 34-clock
// minimum (which must be raised to 34), and that clear restarts a whole period.
module tb_periph_timer;
  localparam int unsigned TW = 16;
  logic          clk = 0, rst_n = 0, clear = 0;
  logic [TW-1:0] modulo, count;
  logic          tick, clamped;
  int checks = 0, failures = 0;

  periph_timer #(.TW(TW), .MIN_PERIOD(34)) dut (.clk, .rst_n, .clear, .modulo, .count, .tick, .clamped);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Follow n periods from count 0 and check every cycle against a model count.
  task automatic run_periods(int period, int n, bit exp_clamped);
    int c;
    c = 0;
    for (int i = 0; i < n * period; i++) begin
      #1;
      checks++;
      if (int'(count) != c || tick != (c == period - 1) || clamped != exp_clamped) begin
        failures++;
        $display("FAIL period %0d: count=%0d exp=%0d tick=%0b clamped=%0b", period, count, c, tick, clamped);
      end
      c = (c == period - 1) ? 0 : c + 1;
      @(negedge clk);
    end
  endtask

  task automatic restart(logic [TW-1:0] m);
    @(negedge clk);
    modulo = m; clear = 1;
    #1;
    checks++;
    if (tick) begin failures++; $display("FAIL tick during clear"); end
    @(negedge clk);
    clear = 0;
  endtask

  initial begin
    modulo = 40;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // After reset the count starts at 0 in this cycle.
    #1;
    checks++;
    if (count != 0) begin failures++; $display("FAIL reset count %0d", count); end
    restart(40);  run_periods(40, 3, 0);
    restart(10);  run_periods(34, 3, 1);
    restart(0);   run_periods(34, 2, 1);
    restart(34);  run_periods(34, 2, 0);
    restart(100); run_periods(100, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
