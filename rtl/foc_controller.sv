// foc_controller: indirect field-oriented speed controller for an induction
// machine fed by a current-controlled voltage-source inverter.
//
// Data flow, once per control sample of dt = 2^-7 s:
//   speed error (w_ref - w_m) -> PI regulator (35, 5) with +/-1.2 pu limit
//   -> torque reference te_ref -> times 1.18 -> torque current command iq*;
//   flux current command id* = 0.9375 pu (constant);
//   iq* -> slip angle (integral of 15.4 * iq*) + 2 * encoder angle
//   -> field angle -> 8-bit sine/cosine index;
//   (id*, iq*, sin, cos) -> inverse Park -> inverse Clarke -> ia*, ib*, ic*;
//   commands minus measured phase currents -> hysteresis comparators
//   -> six inverter gate signals, updated every DIV clocks.
// The clock is the comparators' rate (400 kHz in the reference setting); a
// counter derives the control-sample strobe, one clock in CLKS_PER_SAMPLE
// (400 kHz * 2^-7 s = 3125). The integrators (PI and slip angle) step on that
// strobe, and the speed inputs are registered at the same clock edge at which
// the integrators step, so a new speed error acts on the next step and the
// limiter's registered select settles long before it; everything else (in particular the encoder angle path
// to the sine/cosine table) is combinational or a short pipeline that
// settles within 5 clocks. All values are 14_7 fixed point (pu or rad). Reset is
// asynchronous, active low.
//
// The block structure, gains and constants follow the reference design; the
// clock-rate assumption, the sample counter, the sampled speed inputs and the
// monitoring outputs are choices made here.
module foc_controller
  import foc_pkg::*;
#(
  parameter int CLKS_PER_SAMPLE = 3125,   // clocks per control sample dt
  parameter int HYST_DIV        = 20      // clocks per gate-signal update
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fx_t        w_ref,       // speed reference, pu
  input  fx_t        w_m,         // measured speed, pu
  input  fx_t        theta_m,     // mechanical rotor angle from encoder, rad
  input  abc_t       iabc_meas,   // measured phase currents, pu
  output logic [5:0] pulses,      // inverter gate signals (see hysteresis_control)
  output abc_t       iabc_ref,    // phase current commands, pu
  output fx_t        te_ref,      // torque reference, pu
  output fx_t        theta_s,     // slip angle, rad (monitoring)
  output fx_t        theta_r,     // electrical rotor angle, rad (monitoring)
  output fx_t        theta_e,     // rotor field angle, rad
  output logic [THETA_W-1:0] theta_idx, // field angle, 256 steps per turn
  output logic       sample       // control-sample strobe
);

  // Control-sample strobe.
  logic [$clog2(CLKS_PER_SAMPLE+1)-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      sample  <= 1'b0;
    end else begin
      sample <= div_cnt == $bits(div_cnt)'(CLKS_PER_SAMPLE - 1);
      if (div_cnt == $bits(div_cnt)'(CLKS_PER_SAMPLE - 1)) div_cnt <= '0;
      else                                                 div_cnt <= div_cnt + 1'b1;
    end
  end

  // Speed inputs are sampled once per control sample, so the regulator (and
  // the registered select of its limiter) sees a new error only at dt steps.
  fx_t w_ref_s, w_m_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_ref_s <= '0;
      w_m_s   <= '0;
    end else if (div_cnt == '0) begin
      w_ref_s <= w_ref;
      w_m_s   <= w_m;
    end
  end

  fx_t w_err, iq_ref;
  logic signed [2*FX_W-1:0] iq_prod;

  speed_error u_err (
    .w_ref (w_ref_s),
    .w_m   (w_m_s),
    .w_err (w_err)
  );

  pi_controller u_pi (
    .clk     (clk),
    .rst_n   (rst_n),
    .ce      (sample),
    .w_err   (w_err),
    .torkref (te_ref)
  );

  // Torque reference to torque current command: constant gain 1.18.
  always_comb begin
    iq_prod = (2*FX_W)'(te_ref) * (2*FX_W)'(IQ_GAIN_Q7);
    iq_ref  = fx_t'(iq_prod >>> FX_FRAC);
  end

  rotor_field_angle u_teta (
    .clk       (clk),
    .rst_n     (rst_n),
    .ce        (sample),
    .iq        (iq_ref),
    .theta_m   (theta_m),
    .theta_s   (theta_s),
    .theta_r   (theta_r),
    .theta_e   (theta_e),
    .theta_idx (theta_idx)
  );

  dq_abc u_dqabc (
    .clk       (clk),
    .rst_n     (rst_n),
    .theta_idx (theta_idx),
    .iq        (iq_ref),
    .id        (ID_REF_Q7),
    .iabc      (iabc_ref)
  );

  hysteresis_control #(.DIV(HYST_DIV)) u_hyst (
    .clk      (clk),
    .rst_n    (rst_n),
    .iabc_ref (iabc_ref),
    .iabc     (iabc_meas),
    .pulses   (pulses)
  );

endmodule
