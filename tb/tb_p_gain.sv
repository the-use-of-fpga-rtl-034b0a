// tb_p_gain: checks y = 35 * e over the whole 14_7 input range, including the
// extremes that would wrap a 14-bit product.
module tb_p_gain;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  fx_t e;
  wide_t y;

  p_gain dut (.e(e), .y(y));

  task automatic check(input int v);
    e = fx_t'(v);
    #1;
    checks++;
    if (longint'(y) != longint'(v) * 35) begin
      failures++;
      $display("FAIL p_gain e=%0d y=%0d", v, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(8191); check(-8192); check(90);
    for (int k = 0; k < 300; k++) check(int'($urandom_range(16383)) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
