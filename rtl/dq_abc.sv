// dq_abc: synchronous (d, q) to three-phase (a, b, c) current commands.
//
// Looks up sine and cosine of the 8-bit field angle index and feeds them,
// with the d- and q-axis current commands, to the inverse Park / inverse
// Clarke pipeline. Output latency: 3 clocks from any input.
//
// Structure follows the reference design.
module dq_abc
  import foc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [THETA_W-1:0] theta_idx,  // field angle, 256 steps per turn
  input  fx_t                iq,         // torque current command, pu
  input  fx_t                id,         // flux current command, pu
  output abc_t               iabc        // phase current commands, pu
);

  fx_t s, c;

  sincos u_sincos (
    .theta (theta_idx),
    .sin_o (s),
    .cos_o (c)
  );

  dq_abc_subsystem u_sub (
    .clk   (clk),
    .rst_n (rst_n),
    .iq    (iq),
    .sin_i (s),
    .id    (id),
    .cos_i (c),
    .iabc  (iabc)
  );

endmodule
