// prio_enc: priority encoder giving the position of the most significant set
// bit of its input.
//
// The divider uses two of these, one on the numerator (num_digit) and one on
// the divisor (div_digit), to line the divisor up under the numerator before
// the shift-and-subtract iterations begin, so a division takes only as many
// iterations as the two operands differ in length. Purely combinational:
// idx is valid in the same cycle as in; valid is low (and idx zero) when in is
// all zeros. The encoder's role comes from the controller description; the
// interface is this design's own.
module prio_enc #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         in,
  output logic [$clog2(W)-1:0] idx,
  output logic                 valid
);

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (in[i]) begin
        idx   = i[$clog2(W)-1:0];
        valid = 1'b1;
      end
    end
  end

endmodule
