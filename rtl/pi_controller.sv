// pi_controller: speed PI regulator with torque reference limiter.
//
// The speed error drives a proportional branch (gain 35) and an integral
// branch (gain 5, step dt = 2^-7 s); their sum goes through the +/-1.2 pu
// limiter and becomes the torque reference. The sum is taken in the wide
// word so that it cannot wrap before the limiter. Timing: the proportional
// path is combinational, the integral updates on each ce, the limiter's
// select lags its input by one clock (see torque_limiter).
//
// Structure follows the reference design.
module pi_controller
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,        // control-sample strobe
  input  fx_t  w_err,     // speed error, pu
  output fx_t  torkref    // limited torque reference, pu
);

  wide_t p_out, i_out, pi_sum;

  p_gain u_p (
    .e (w_err),
    .y (p_out)
  );

  integrator u_i (
    .clk   (clk),
    .rst_n (rst_n),
    .ce    (ce),
    .e     (w_err),
    .y     (i_out)
  );

  always_comb pi_sum = p_out + i_out;

  torque_limiter u_lim (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (pi_sum),
    .y     (torkref)
  );

endmodule
