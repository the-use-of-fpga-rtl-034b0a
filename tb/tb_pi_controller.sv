// tb_pi_controller: runs the PI regulator with a sample strobe every 8th
// clock and compares the torque reference with a model kept in the testbench:
// p = 35*e, integral = sum of 5*e (units 2^-14), out = clamp(p + integral/2^7,
// +/-154). Covers positive and negative saturation and the unsaturated range.
module tb_pi_controller;
  import foc_pkg::*;

  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, n_lin = 0;
  logic clk = 0, rst_n = 0, ce = 0;
  fx_t e = '0, t;
  longint acc = 0;

  pi_controller dut (.clk(clk), .rst_n(rst_n), .ce(ce), .w_err(e), .torkref(t));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int ev);
    longint s, exp_v;
    e = fx_t'(ev);
    ce = 1; @(negedge clk); ce = 0;
    acc += longint'(ev) * 5;
    repeat (3) @(negedge clk);
    s = longint'(ev) * 35 + (acc >>> 7);
    exp_v = (s > 154) ? 154 : (s < -154) ? -154 : s;
    if (s > 154) n_pos++; else if (s < -154) n_neg++; else n_lin++;
    checks++;
    if (longint'(t) != exp_v) begin
      failures++;
      $display("FAIL pi e=%0d t=%0d expected %0d", ev, t, exp_v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) step(90);     // large positive error
    for (int k = 0; k < 60; k++) step(-90);    // large negative error
    for (int k = 0; k < 200; k++) step(int'($urandom_range(16)) - 8);  // small errors
    for (int k = 0; k < 200; k++) step(int'($urandom_range(200)) - 100);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_lin == 0) begin
      failures++;
      $display("FAIL pi coverage pos=%0d neg=%0d lin=%0d", n_pos, n_neg, n_lin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
