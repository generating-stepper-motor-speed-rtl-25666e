// divider: sequential unsigned divider, quot = num / den, rem = num % den.
//
// Works like a restoring shift-and-subtract division that starts at the
// right place: the priority encoders num_digit and div_digit find the leading
// one of each operand, and the divisor is shifted left by the difference so
// that its leading one sits under the numerator's. From there one quotient bit
// is produced per clock while the divisor is shifted back right. The controller
// description gives the use of the two priority encoders and the bound of 33
// clock cycles for 32-bit numbers; the restoring iteration is this design's
// choice for the algorithm the description only names.
//
// Timing: start is sampled while busy is low. The clock edge that samples it
// loads the operands (1 cycle); then (msb(num) - msb(den) + 1) iteration
// cycles follow, so a 32-bit division takes at most 1 + 32 = 33 cycles. done
// is high for one cycle after the last edge, together with valid quot/rem,
// which then hold until the next start. When num < den, or num is zero, the
// result is ready after the loading edge. Division by zero returns an all-ones
// quotient and rem = num (own choice).
module divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot,
  output logic [W-1:0] rem
);

  localparam int unsigned IW = $clog2(W);

  logic [IW-1:0] num_digit, div_digit;
  logic          num_nz, den_nz;

  prio_enc #(.W(W)) u_num_digit (.in(num), .idx(num_digit), .valid(num_nz));
  prio_enc #(.W(W)) u_div_digit (.in(den), .idx(div_digit), .valid(den_nz));

  logic [W-1:0]  d_r;
  logic [IW-1:0] cnt_r;
  logic [IW-1:0] shift;

  assign shift = num_digit - div_digit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      quot  <= '0;
      rem   <= '0;
      d_r   <= '0;
      cnt_r <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem <= num;
          if (!den_nz) begin
            quot <= '1;
            done <= 1'b1;
          end else if (!num_nz || (num_digit < div_digit)) begin
            quot <= '0;
            done <= 1'b1;
          end else begin
            quot  <= '0;
            d_r   <= den << shift;
            cnt_r <= shift;
            busy  <= 1'b1;
          end
        end
      end else begin
        if (rem >= d_r) begin
          rem  <= rem - d_r;
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          quot <= {quot[W-2:0], 1'b0};
        end
        d_r <= d_r >> 1;
        if (cnt_r == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt_r <= cnt_r - 1'b1;
        end
      end
    end
  end

endmodule
