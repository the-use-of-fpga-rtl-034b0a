// torque_limiter: clamps the PI output to +/-1.2 pu (the torque reference).
//
// Two comparators check the PI output against the limits; each has a
// one-cycle register at its output. "lo" is set when the input is above
// +1.2 pu and "hi" when it is below -1.2 pu; {hi, lo} selects a 4-input
// multiplexer: 00 passes the input, 01 gives +1.2 pu, 10 gives -1.2 pu, and
// 11, which cannot occur, passes the input. Because the select is registered
// while the data path is not, the output follows a new input immediately and
// the clamp acts one clock later; the controller changes its input only once
// per control sample (thousands of clocks), so only that first clock is
// affected. Reset clears both comparator registers. An assertion checks that
// hi and lo are never set together.
//
// Comparators, registers, select encoding and mux inputs follow the reference
// design; the reset value and the assertion are added here.
module torque_limiter
  import foc_pkg::*;
#(
  parameter fx_t LIMIT = TLIM_Q7   // limit, 14_7 (1.2 pu)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  wide_t x,                  // PI output, 7 fractional bits
  output fx_t   y                   // torque reference, 14_7
);

  logic hi, lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi <= 1'b0;
      lo <= 1'b0;
    end else begin
      lo <= x > wide_t'(LIMIT);
      hi <= x < -wide_t'(LIMIT);
    end
  end

  always_comb begin
    unique case ({hi, lo})
      2'b01:   y = LIMIT;
      2'b10:   y = -LIMIT;
      default: y = fx_t'(x);
    endcase
  end

  a_not_both : assert property (@(posedge clk) disable iff (!rst_n) !(hi && lo))
    else $error("torque_limiter: hi and lo set together");

endmodule
