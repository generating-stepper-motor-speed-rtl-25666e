// tb_divider: divides directed and random operand pairs and compares quotient
// and remainder with the language's own / and %. Also checks the latency:
// one loading cycle plus one cycle per quotient bit between the two leading
// ones, never more than 33 cycles for 32-bit operands.
module tb_divider;
  localparam int unsigned W = 32;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] num, den, quot, rem;
  logic         busy, done;
  int checks = 0, failures = 0, cycles = 0, max_lat = 0;

  divider #(.W(W)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot, .rem);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int msb(logic [W-1:0] v);
    for (int i = W - 1; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  task automatic div_one(logic [W-1:0] a, logic [W-1:0] b);
    int t0, lat, exp_lat;
    logic [W-1:0] eq, er;
    @(negedge clk);
    num = a; den = b; start = 1;
    t0 = cycles;
    @(negedge clk);
    start = 0;
    num = $urandom; den = $urandom;   // operands need only be held for the start edge
    while (!done) @(negedge clk);
    lat = cycles - t0;
    if (b == 0) begin eq = '1; er = a; exp_lat = 1; end
    else begin
      eq = a / b; er = a % b;
      exp_lat = (a == 0 || msb(a) < msb(b)) ? 1 : 1 + (msb(a) - msb(b) + 1);
    end
    if (lat > max_lat) max_lat = lat;
    checks++;
    if (quot !== eq || rem !== er) begin
      failures++; $display("FAIL %0d / %0d: got q=%0d r=%0d exp q=%0d r=%0d", a, b, quot, rem, eq, er);
    end
    checks++;
    if (lat != exp_lat || lat > 33) begin
      failures++; $display("FAIL latency %0d / %0d: %0d cycles, expected %0d", a, b, lat, exp_lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    div_one(100, 7);
    div_one(32'hFFFF_FFFF, 1);     // longest: 33 cycles
    div_one(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    div_one(5, 9);                 // quotient 0
    div_one(0, 3);
    div_one(1234, 0);
    div_one(2 * 1000 + 3, 4 * 1 + 1);
    for (int i = 0; i < 400; i++) div_one($urandom, $urandom >> ($urandom % 32));
    checks++;
    if (max_lat != 33) begin failures++; $display("FAIL worst latency %0d, expected 33", max_lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
