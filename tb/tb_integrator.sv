// tb_integrator: drives random speed errors with a control-sample strobe every
// 4th clock and checks the output against a reference integral kept in the
// testbench (sum of 5 * e in units of 2^-14, read out floor-divided by 2^7).
// Also checks that the output only moves on a strobe and that a constant
// error of 1 pu grows the integral by 5 * 2^-7 per sample.
module tb_integrator;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0;
  fx_t e = '0;
  wide_t y;
  longint model = 0;

  integrator dut (.clk(clk), .rst_n(rst_n), .ce(ce), .e(e), .y(y));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what);
    longint exp_v;
    exp_v = model >>> 7;
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      $display("FAIL integrator %s: y=%0d expected %0d", what, y, exp_v);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cmp("after reset");
    // constant 1 pu error: 5/128 pu per sample
    e = fx_t'(128);
    for (int k = 0; k < 64; k++) begin
      ce = 1; @(negedge clk); ce = 0;
      model += 128 * 5;
      cmp("constant");
      repeat (3) @(negedge clk);
      cmp("hold between samples");
    end
    // after 64 samples of 1 pu: 64 * 5 / 128 = 2.5 pu = 320 in 14_7
    checks++;
    if (y != 320) begin failures++; $display("FAIL integrator 2.5 pu: %0d", y); end
    for (int k = 0; k < 400; k++) begin
      e = fx_t'(int'($urandom_range(6000)) - 3000);
      ce = 1; @(negedge clk); ce = 0;
      model += longint'(e) * 5;
      cmp("random");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
