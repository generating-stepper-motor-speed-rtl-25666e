// tb_prio_enc: checks the leading-one encoder against a top-down search over
// walking-one patterns, random words and zero.
module tb_prio_enc;
  localparam int unsigned W = 32;
  logic [W-1:0] in;
  logic [4:0]   idx;
  logic         valid;
  int checks = 0, failures = 0;

  prio_enc #(.W(W)) dut (.in, .idx, .valid);

  task automatic check_one(logic [W-1:0] v);
    int exp_idx;
    exp_idx = -1;
    for (int i = W - 1; i >= 0; i--) if (v[i]) begin exp_idx = i; break; end
    in = v;
    #1;
    checks++;
    if (exp_idx < 0) begin
      if (valid !== 1'b0 || idx !== '0) begin failures++; $display("FAIL zero: valid=%0b idx=%0d", valid, idx); end
    end else if (valid !== 1'b1 || int'(idx) != exp_idx) begin
      failures++; $display("FAIL in=%h idx=%0d exp=%0d", v, idx, exp_idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    for (int i = 0; i < W; i++) check_one(W'(1) << i);
    for (int i = 0; i < W; i++) check_one((W'(1) << i) | W'($urandom) >> (W - i));
    for (int i = 0; i < 200; i++) check_one($urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
