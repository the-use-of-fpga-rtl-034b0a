// tb_slip_angle: integrates constant and random torque-current commands and
// compares the slip angle with a testbench model (increment
// floor(iq*1971/2^7) in units of 2^-14, reset to 0 once beyond +/-6.28125).
// Also checks the angle against the real-valued integral 15.4*iq*t for the
// first samples, and that wraps happen in both directions.
module tb_slip_angle;
  import foc_pkg::*;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int checks = 0, failures = 0, wraps_pos = 0, wraps_neg = 0;
  logic clk = 0, rst_n = 0, ce = 0;
  fx_t iq = '0, th;
  longint acc = 0;
  localparam longint LIM = 804 * 128;

  slip_angle dut (.clk(clk), .rst_n(rst_n), .ce(ce), .iq(iq), .theta_s(th));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int v);
    longint fb, exp_v;
    iq = fx_t'(v);
    ce = 1; @(negedge clk); ce = 0;
    repeat (3) @(negedge clk);
    fb = (acc > LIM || acc < -LIM) ? 0 : acc;
    acc = fb + ((longint'(v) * 1971) >>> 7);
    if (acc > LIM) wraps_pos++;
    if (acc < -LIM) wraps_neg++;
    exp_v = ((acc > LIM || acc < -LIM) ? 0 : acc) >>> 7;
    checks++;
    if (longint'(th) != exp_v) begin
      failures++;
      $display("FAIL slip iq=%0d th=%0d expected %0d", v, th, exp_v);
    end
  endtask

  initial begin
    real r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 0.5 pu: 15.4 * 0.5 * 2^-7 = 0.0602 rad per sample
    for (int k = 1; k <= 60; k++) begin
      step(64);
      r = 15.4 * 0.5 * 0.0078125 * k;
      checks++;
      if (absr(real'(th) / 128.0 - r) > 0.03) begin
        failures++;
        $display("FAIL slip real k=%0d th=%f expected %f", k, real'(th) / 128.0, r);
      end
    end
    for (int k = 0; k < 300; k++) step(181);   // 1.416 pu (limit times 1.18)
    for (int k = 0; k < 300; k++) step(-181);
    for (int k = 0; k < 300; k++) step(int'($urandom_range(362)) - 181);
    checks++;
    if (wraps_pos == 0 || wraps_neg == 0) begin
      failures++;
      $display("FAIL slip wraps pos=%0d neg=%0d", wraps_pos, wraps_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
