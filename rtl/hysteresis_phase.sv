// hysteresis_phase: switching decision for one inverter leg.
//
// Takes the current error of one phase (reference minus measured, 14_7) and
// compares it with two thresholds, +0.0078125 (P) and -0.0078125 (N), each
// comparator testing "error > threshold" and having a one-cycle output
// register. The OR of the two is the upper-switch signal (Out1) and its
// complement the lower-switch signal (Out2), so the two switches of a leg are
// never on together. As built, the OR of the two tests is set whenever the
// error is above -0.0078125: the leg pushes the current up until it is within
// one LSB above the reference and down otherwise. Output latency: 1 clock.
// Reset clears both comparator registers (upper switch off, lower on).
//
// Thresholds, comparators and outputs follow the reference design; reading
// Out1/Out2 as upper/lower switch is a choice made here.
module hysteresis_phase
  import foc_pkg::*;
#(
  parameter fx_t BAND = HBAND_Q7    // threshold magnitude, 14_7
) (
  input  logic clk,
  input  logic rst_n,
  input  fx_t  err,      // current error, pu
  output logic upper,    // Out1: upper switch on
  output logic lower     // Out2: lower switch on
);

  logic r_p, r_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_p <= 1'b0;
      r_n <= 1'b0;
    end else begin
      r_p <= err > BAND;
      r_n <= err > -BAND;
    end
  end

  always_comb begin
    upper = r_p | r_n;
    lower = ~upper;
  end

endmodule
