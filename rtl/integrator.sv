// integrator: integral branch of the speed PI regulator.
//
// A discrete forward-Euler integrator: on every control sample (ce high) the
// speed error times KI * dt is added to an accumulator register, and the
// register is the output, so the output moves one sample after the error is
// applied. KI = 5 and dt = 2^-7 s; since dt is one LSB of the 14_7 format, the
// increment e * KI * dt is simply e * KI with 14 instead of 7 fractional bits.
// The accumulator keeps those 14 fractional bits so that small errors are not
// lost, and is read out truncated to 7 fractional bits. It is wide enough not
// to wrap in any run of practical length; there is no anti-windup clamp.
// Reset (active low, asynchronous) clears the accumulator.
//
// Gain, step and the adder/delay structure follow the reference design; the
// extra accumulator precision and the absence of anti-windup are choices made
// here.
module integrator
  import foc_pkg::*;
#(
  parameter int GAIN  = KI,    // integral gain KI
  parameter int ACC_W = 32     // accumulator width, 2*FX_FRAC fractional bits
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,            // control-sample strobe (one per dt)
  input  fx_t   e,             // speed error, 14_7
  output wide_t y              // integral, 7 fractional bits
);

  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (ce) acc <= acc + ACC_W'(e) * ACC_W'(GAIN);
  end

  always_comb y = wide_t'(acc >>> FX_FRAC);

endmodule
