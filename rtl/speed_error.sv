// speed_error: speed error of the speed regulator.
//
// Subtracts the measured rotor speed from the reference speed,
// w_err = w_ref - w_m, all three in per unit in the 14_7 format. Purely
// combinational: the error is valid in the same cycle as the inputs. The
// subtraction keeps the 14_7 width; it cannot wrap as long as both speeds lie
// within +/-32 pu, which holds for any speed the regulator is meant for.
//
// The block follows the reference design; the 14_7 word width is this design's choice.
module speed_error
  import foc_pkg::*;
(
  input  fx_t w_ref,   // reference speed, pu
  input  fx_t w_m,     // measured speed, pu
  output fx_t w_err    // w_ref - w_m, pu
);

  always_comb w_err = w_ref - w_m;

endmodule
