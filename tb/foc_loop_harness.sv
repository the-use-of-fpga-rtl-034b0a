// foc_loop_harness: the whole controller (default parameters) closed around
// the behavioural plant foc_plant, with a speed/load profile and all
// closed-loop checks. Instantiated by the closed-loop testbenches, which
// choose the profile and report the result.
//
// Profiles (speed reference +0.7 pu until 2 s, then -0.7 pu, in both):
//   PROFILE 0: 4.5 s; load 0, +1.0, 0, -1.0 pu over 0-1, 1-2, 2-3.5, 3.5-4.5 s;
//              speed checked at 1.0, 2.0, 3.5 and 4.5 s.
//   PROFILE 1: 4.0 s; load 0, +1.0, 0, -1.0 pu over 0-1, 1-2, 2-3, 3-4 s;
//              speed checked at 1.0, 2.0 and 4.0 s (at 3.0 s the machine is
//              still reversing at the torque limit).
//
// Checks: speed within 0.1 pu of the reference at the check times (the
// regulator has no anti-windup, so it overshoots by a few hundredths of a pu
// after each speed step); phase currents track their commands (at most 5% of
// clocks off by more than 0.15 pu after the first 0.1 s); on every control
// sample, once settled, the commands transformed back with the controller's
// own field angle give iq* = 1.18*te_ref and id* = 0.9375 within 0.06 pu, the
// field angle is slip + rotor angle (wrapped) with index theta_e*40.75, and the
// torque reference is within +/-1.2 pu; 128 control samples per second.
// Coverage: each mechanism must occur at least once: torque clamp at +1.2 and
// at -1.2, slip-angle reset, electrical-angle wrap, field-angle wrap, both
// switch states of every leg, and regenerating operation (torque against
// speed). The field-angle wrap below -2*pi cannot occur in the assembled
// controller (the slip angle never goes below -2*pi); the theta_ref
// testbench covers it.
module foc_loop_harness
  import foc_pkg::*;
#(
  parameter int PROFILE = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam real PI    = 3.14159265358979;
  localparam int  T_END = (PROFILE == 0) ? 1_800_000 : 1_600_000;

  logic clk = 0, rst_n = 0;
  fx_t w_ref, w_m, theta_m, te_ref, theta_s, theta_r, theta_e;
  logic [7:0] theta_idx;
  abc_t iabc_meas, iabc_ref;
  logic [5:0] pulses;
  logic sample;
  real tl = 0.0, w, te;

  foc_controller dut (
    .clk(clk), .rst_n(rst_n), .w_ref(w_ref), .w_m(w_m), .theta_m(theta_m),
    .iabc_meas(iabc_meas), .pulses(pulses), .iabc_ref(iabc_ref),
    .te_ref(te_ref), .theta_s(theta_s), .theta_r(theta_r), .theta_e(theta_e),
    .theta_idx(theta_idx), .sample(sample)
  );

  foc_plant plant (
    .clk(clk), .run(rst_n), .pulses(pulses), .theta_idx(theta_idx), .tl(tl),
    .w_m(w_m), .theta_m(theta_m), .iabc_meas(iabc_meas), .w(w), .te(te)
  );

  always #5 clk = ~clk;

  int cyc = 0, off_track = 0, tracked = 0;
  fx_t theta_s_prev = '0;
  int n_lim_pos = 0, n_lim_neg = 0, n_slip_wrap = 0, n_pos_wrap = 0;
  int n_ref_wrap = 0, n_regen = 0, n_samples = 0;
  int n_up [3] = '{0, 0, 0};
  int n_dn [3] = '{0, 0, 0};

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
  end

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real park_q(input real a, input real b, input real c, input real th);
    return 2.0 / 3.0 * (a * $cos(th) + b * $cos(th - 2.0 * PI / 3.0) + c * $cos(th + 2.0 * PI / 3.0));
  endfunction

  function automatic real park_d(input real a, input real b, input real c, input real th);
    return 2.0 / 3.0 * (a * $sin(th) + b * $sin(th - 2.0 * PI / 3.0) + c * $sin(th + 2.0 * PI / 3.0));
  endfunction

  task automatic check_speed(input real target, input string tag);
    checks++;
    if (absr(w - target) > 0.1) begin
      failures++;
      $display("FAIL speed at %s: %f pu, reference %f", tag, w, target);
    end else
      $display("speed at %s: %f pu (reference %f)", tag, w, target);
  endtask

  // profile, set just before the plant update of the same falling edge
  always @(negedge clk) begin
    real t;
    if (rst_n) cyc++;
    t = real'(cyc) * 2.5e-6;
    w_ref = (t < 2.0) ? fx_t'(90) : fx_t'(-90);     // +/-0.7 pu (0.703)
    if (PROFILE == 0)
      tl = (t < 1.0) ? 0.0 : (t < 2.0) ? 1.0 : (t < 3.5) ? 0.0 : -1.0;
    else
      tl = (t < 1.0) ? 0.0 : (t < 2.0) ? 1.0 : (t < 3.0) ? 0.0 : -1.0;
  end

  // mechanisms and current tracking
  always @(posedge clk) if (rst_n) begin
    if (te_ref == TLIM_Q7) n_lim_pos++;
    if (te_ref == -TLIM_Q7) n_lim_neg++;
    // the slip angle falls back to 0 from near +/-2*pi
    if (theta_s == 0 && (theta_s_prev > 14'sd700 || theta_s_prev < -14'sd700)) n_slip_wrap++;
    theta_s_prev = theta_s;
    if (theta_r < theta_m) n_pos_wrap++;              // 2*theta_m - 2*pi < theta_m
    if (int'(theta_s) + int'(theta_r) > 804) n_ref_wrap++;
    if ((te_ref > 0 && w_m < -14'sd10) || (te_ref < 0 && w_m > 14'sd10)) n_regen++;
    for (int ph = 0; ph < 3; ph++) begin
      if (pulses[2*ph]) n_up[ph]++; else n_dn[ph]++;
    end
    if (cyc > 40_000) begin
      tracked++;
      if (absr(real'(iabc_ref.a - iabc_meas.a)) > 0.15 * 128.0 ||
          absr(real'(iabc_ref.b - iabc_meas.b)) > 0.15 * 128.0 ||
          absr(real'(iabc_ref.c - iabc_meas.c)) > 0.15 * 128.0)
        off_track++;
    end
  end

  // per control sample, once the pipelines have settled
  always @(posedge clk) if (rst_n && sample) begin
    real th, q, d, iq_exp;
    n_samples++;
    repeat (8) @(posedge clk);
    th = 2.0 * PI * real'(theta_idx) / 256.0;
    q = park_q(real'(iabc_ref.a) / 128.0, real'(iabc_ref.b) / 128.0, real'(iabc_ref.c) / 128.0, th);
    d = park_d(real'(iabc_ref.a) / 128.0, real'(iabc_ref.b) / 128.0, real'(iabc_ref.c) / 128.0, th);
    iq_exp = real'(te_ref) / 128.0 * 1.18;
    checks++;
    if (absr(q - iq_exp) > 0.06 || absr(d - 0.9375) > 0.06) begin
      failures++;
      $display("FAIL command frame at clock %0d: q=%f (exp %f) d=%f", cyc, q, iq_exp, d);
    end
    checks++;
    if (!(int'(theta_e) == int'(theta_s) + int'(theta_r) ||
          int'(theta_e) == int'(theta_s) + int'(theta_r) - 804) ||
        int'(theta_idx) != (int'($floor(real'(theta_e) * 40.75 / 128.0)) & 255)) begin
      failures++;
      $display("FAIL field angle at clock %0d: %0d + %0d -> %0d idx %0d", cyc, theta_s,
               theta_r, theta_e, theta_idx);
    end
    checks++;
    if (te_ref > TLIM_Q7 || te_ref < -TLIM_Q7) begin
      failures++;
      $display("FAIL torque reference out of limits: %0d", te_ref);
    end
  end

  initial begin
    int exp_samples;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (cyc == 400_000);  check_speed(0.7, "1.0 s");
    wait (cyc == 800_000);  check_speed(0.7, "2.0 s");
    if (PROFILE == 0) begin
      wait (cyc == 1_400_000); check_speed(-0.7, "3.5 s");
    end
    wait (cyc == T_END);    check_speed(-0.7, (PROFILE == 0) ? "4.5 s" : "4.0 s");
    checks++;
    if (off_track * 20 > tracked) begin
      failures++;
      $display("FAIL current tracking: %0d of %0d clocks off by > 0.15 pu", off_track, tracked);
    end
    $display("current tracking: %0d of %0d clocks off by > 0.15 pu", off_track, tracked);
    $display("mechanisms: clamp+ %0d, clamp- %0d, slip reset %0d, rotor-angle wrap %0d, field-angle wrap %0d, regen %0d, samples %0d",
             n_lim_pos, n_lim_neg, n_slip_wrap, n_pos_wrap, n_ref_wrap, n_regen, n_samples);
    checks++;
    if (n_lim_pos == 0 || n_lim_neg == 0 || n_slip_wrap == 0 || n_pos_wrap == 0 ||
        n_ref_wrap == 0 || n_regen == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int ph = 0; ph < 3; ph++) begin
      checks++;
      if (n_up[ph] == 0 || n_dn[ph] == 0) begin
        failures++;
        $display("FAIL leg %0d never switched both ways", ph);
      end
    end
    // 3125 clocks per sample: T_END / 3125 samples, give or take one
    exp_samples = T_END / 3125;
    checks++;
    if (n_samples < exp_samples - 1 || n_samples > exp_samples + 1) begin
      failures++;
      $display("FAIL %0d control samples, expected %0d", n_samples, exp_samples);
    end
    done = 1;
  end
endmodule
