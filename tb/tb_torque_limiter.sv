// tb_torque_limiter: checks the +/-1.2 pu clamp (154 in units of 2^-7) on
// values around and far beyond both limits, and the one-clock lag of the
// clamp after a step of the input.
module tb_torque_limiter;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  wide_t x = '0;
  fx_t y;

  torque_limiter dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    int exp_v;
    x = wide_t'(v);
    @(negedge clk);
    exp_v = (v > 154) ? 154 : (v < -154) ? -154 : v;
    checks++;
    if (int'(y) != exp_v) begin
      failures++;
      $display("FAIL limiter x=%0d y=%0d expected %0d", v, y, exp_v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply(0); apply(153); apply(154); apply(155); apply(-154); apply(-155);
    apply(1000); apply(-1000); apply(200000); apply(-200000); apply(-20); apply(100);
    for (int k = 0; k < 300; k++) apply(int'($urandom_range(1200)) - 600);
    // one-clock lag: a step from 0 to 300 passes unclamped until the next edge
    apply(0);
    x = wide_t'(300);
    #1;
    checks++;
    if (y != 14'sd300) begin failures++; $display("FAIL limiter lag: y=%0d", y); end
    @(negedge clk);
    checks++;
    if (y != 14'sd154) begin failures++; $display("FAIL limiter after lag: y=%0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
