// theta_ref: rotor field angle reference and its conversion to a table index.
//
// Adds the slip angle theta_s and the electrical rotor angle theta_r to get
// the field angle theta_e. Two comparators, each with a one-cycle output
// register, test the sum against +6.28125 and -6.28125 (2*pi): above the upper
// bound 2*pi is subtracted, below the lower bound 2*pi is added, otherwise
// nothing. The result, in radians, is multiplied by 40.75 (= 256 / 2*pi) and
// the integer part taken modulo 256 becomes the 8-bit angle index for the
// sine/cosine table (0 .. 255 for 0 .. 2*pi). Taking the index modulo 256
// maps a negative angle onto the same point of the circle, so the index is
// right for any theta_e in (-2*pi, 2*pi). The correction lags a change of the
// sum by one clock (registered comparators); the inputs change once per
// control sample. Reset clears the comparator registers.
//
// Comparators, correction, scaling and the 8-bit index follow the reference
// design; taking the index modulo 256 for negative angles is a choice made
// here.
module theta_ref
  import foc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  fx_t                theta_s,    // slip angle, rad
  input  fx_t                theta_r,    // electrical rotor angle, rad
  output fx_t                theta_e,    // field angle, rad
  output logic [THETA_W-1:0] theta_idx   // field angle, 256 steps per turn
);

  logic signed [FX_W:0] sum, corr;
  logic signed [2*FX_W+1:0] scaled;
  logic gt, lt;

  always_comb sum = (FX_W+1)'(theta_s) + (FX_W+1)'(theta_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gt <= 1'b0;
      lt <= 1'b0;
    end else begin
      gt <= sum > (FX_W+1)'(TWO_PI_Q7);
      lt <= sum < -(FX_W+1)'(TWO_PI_Q7);
    end
  end

  always_comb begin
    corr      = (gt || lt) ? (FX_W+1)'(TWO_PI_Q7) : '0;
    theta_e   = fx_t'(gt ? sum - corr : sum + corr);
    scaled    = (2*FX_W+2)'(theta_e) * (2*FX_W+2)'(THSCALE_Q7);
    theta_idx = THETA_W'(scaled >>> (2*FX_FRAC));
  end

endmodule
