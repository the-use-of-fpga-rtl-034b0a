// p_gain: proportional branch of the speed PI regulator.
//
// Multiplies the speed error by the constant gain K1 = 35 (a constant
// multiplier, no state). The product keeps the 7 fractional bits of the input
// and is widened to the regulator's wide word so that a large speed error
// (up to the full 14_7 range times 35) cannot wrap before the torque limiter
// clamps it. Combinational; output valid in the same cycle.
//
// The gain follows the reference design; the widened output is this design's choice.
module p_gain
  import foc_pkg::*;
#(
  parameter int GAIN = KP      // proportional gain K1
) (
  input  fx_t   e,             // speed error, 14_7
  output wide_t y              // GAIN * e, 7 fractional bits
);

  always_comb y = wide_t'(e) * wide_t'(GAIN);

endmodule
