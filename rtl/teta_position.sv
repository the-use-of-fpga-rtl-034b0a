// teta_position: electrical rotor angle from the mechanical encoder angle.
//
// Multiplies the mechanical rotor angle (0 .. 2*pi rad, 14_7) by the pole-pair
// number 2. When the product exceeds 6.28125 (2*pi) a comparator selects the
// product minus 2*pi, so the electrical angle theta_r stays in 0 .. 2*pi.
// One subtraction suffices for two pole pairs, which is why POLE_PAIRS is
// checked to be 1 or 2. Combinational.
//
// Structure follows the reference design; the angle format of the encoder
// input (radians, 14_7) is a choice made here.
module teta_position
  import foc_pkg::*;
#(
  parameter int PPAIRS = POLE_PAIRS
) (
  input  fx_t theta_m,   // mechanical rotor angle, rad, 0 .. 2*pi
  output fx_t theta_r    // electrical rotor angle, rad, 0 .. 2*pi
);

  if (PPAIRS < 1 || PPAIRS > 2) begin : g_bad_pp
    $error("teta_position: one wrap subtraction supports 1 or 2 pole pairs");
  end

  fx_t scaled;

  always_comb begin
    scaled  = theta_m * fx_t'(PPAIRS);
    theta_r = (scaled > TWO_PI_Q7) ? scaled - TWO_PI_Q7 : scaled;
  end

endmodule
