// foc_plant: behavioural stand-in for inverter, induction machine, encoder
// and current/speed converters, used by the closed-loop testbenches. Not
// synthesizable (real arithmetic); it is not part of the controller.
//
// Updated at every falling clock edge of 2.5 us (400 kHz) while run is high:
//  - each phase current rises by 8/128 pu per 20 clocks while its upper
//    switch is on and falls at the same rate while the lower one is on (an
//    ideal, stiff inverter; the phases are treated as independent);
//  - the torque te is the q-axis current measured in the controller's own
//    field frame (angle index theta_idx) divided by 1.18, i.e. rated flux and
//    achieved field orientation are assumed;
//  - the rotor obeys d(w)/dt = (te - tl) / (2H), H = 0.5 s, and its
//    mechanical angle advances at w * 157.08 rad/s (two pole pairs, 50 Hz).
// Outputs are quantised to the controller's 14_7 format: speed rounded,
// angle truncated to 0 .. 804 (2*pi), currents rounded. w and te are also
// given as reals for checking.
module foc_plant
  import foc_pkg::*;
(
  input  logic       clk,
  input  logic       run,         // advance the model
  input  logic [5:0] pulses,      // gate signals (upper switches on even bits)
  input  logic [7:0] theta_idx,   // controller's field angle, 1/256 turn
  input  real        tl,          // load torque, pu
  output fx_t        w_m,         // measured speed, pu
  output fx_t        theta_m,     // encoder angle, rad
  output abc_t       iabc_meas,   // measured phase currents, pu
  output real        w,           // speed, pu
  output real        te           // electromagnetic torque, pu
);

  localparam real TCLK  = 2.5e-6;
  localparam real H     = 0.5;
  localparam real WBASE = 157.0796;
  localparam real PI    = 3.14159265358979;
  localparam real STEP  = 8.0 / 128.0 / 20.0;

  real ia = 0.0, ib = 0.0, ic = 0.0, thm = 0.0;

  function automatic fx_t to_fx(input real v);
    return fx_t'(int'($floor(v * 128.0 + 0.5)));
  endfunction

  initial begin
    w  = 0.0;
    te = 0.0;
  end

  always @(negedge clk) begin
    real th;
    if (run) begin
      ia += pulses[0] ? STEP : -STEP;
      ib += pulses[2] ? STEP : -STEP;
      ic += pulses[4] ? STEP : -STEP;
      th = 2.0 * PI * real'(theta_idx) / 256.0;
      te = 2.0 / 3.0 * (ia * $cos(th) + ib * $cos(th - 2.0 * PI / 3.0) +
                        ic * $cos(th + 2.0 * PI / 3.0)) / 1.18;
      w += (te - tl) / (2.0 * H) * TCLK;
      thm += w * WBASE * TCLK;
      while (thm >= 2.0 * PI) thm -= 2.0 * PI;
      while (thm < 0.0) thm += 2.0 * PI;
    end
    w_m         = to_fx(w);
    theta_m     = fx_t'(int'($floor(thm * 128.0)));
    iabc_meas.a = to_fx(ia);
    iabc_meas.b = to_fx(ib);
    iabc_meas.c = to_fx(ic);
  end

endmodule
