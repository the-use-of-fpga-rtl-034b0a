// slip_angle: slip-frequency angle generator ("swe").
//
// The slip frequency for a rotor flux held at its rated value is
// s*w_e = Ks * iq*, with Ks = r_r*L_m / (L_r*lambda_dr) = 15.4 for the
// machine in question. Its integral, the slip angle theta_s, is formed by
// adding Ks * iq* * dt (dt = 2^-7 s) to an accumulator register on every
// control sample. Two comparators, each with a one-cycle output register,
// check the accumulator against +/-6.28125 (2*pi); when either fires, a
// multiplexer replaces the accumulator value by 0, both at the output and in
// the feedback to the adder. The angle therefore stays within (-2*pi, 2*pi).
// The accumulator carries 14 fractional bits; the output is 14_7 (radians).
// The comparators settle one clock after each accumulator update, well before
// the next control sample. Reset clears the accumulator and the comparators.
//
// Gain, step, the +/-2*pi comparators and the reset-to-zero follow the
// reference design; accumulator width and precision are choices made here.
module slip_angle
  import foc_pkg::*;
#(
  parameter fx_t KS    = KS_Q7,   // slip gain Ks, 14_7
  parameter int  ACC_W = 24       // accumulator width, 2*FX_FRAC fractional bits
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,                // control-sample strobe
  input  fx_t  iq,                // torque current command iq*, pu
  output fx_t  theta_s            // slip angle, rad, 14_7
);

  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t LIM = acc_t'(TWO_PI_Q7) <<< FX_FRAC;

  acc_t acc, fb, step;
  logic gt, lt;

  // Ks * iq has 14 fractional bits; times dt = 2^-7 it has 21, kept to 14.
  always_comb step = (acc_t'(iq) * acc_t'(KS)) >>> DT_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      gt  <= 1'b0;
      lt  <= 1'b0;
    end else begin
      if (ce) acc <= fb + step;
      gt <= acc > LIM;
      lt <= acc < -LIM;
    end
  end

  always_comb fb = (gt || lt) ? '0 : acc;

  always_comb theta_s = fx_t'(fb >>> FX_FRAC);

endmodule
