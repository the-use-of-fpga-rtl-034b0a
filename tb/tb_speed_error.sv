// tb_speed_error: checks w_err = w_ref - w_m on directed and random speeds
// (within +/-16 pu) against integer arithmetic done in the testbench.
module tb_speed_error;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  fx_t w_ref, w_m, w_err;

  speed_error dut (.w_ref(w_ref), .w_m(w_m), .w_err(w_err));

  task automatic check(input int a, input int b);
    w_ref = fx_t'(a);
    w_m   = fx_t'(b);
    #1;
    checks++;
    if (int'(w_err) != a - b) begin
      failures++;
      $display("FAIL speed_error %0d - %0d gave %0d", a, b, w_err);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(90, 0);        // 0.7 pu reference at standstill
    check(-90, 90);      // reversal
    check(90, 90);       // zero error
    for (int k = 0; k < 500; k++)
      check(int'($urandom_range(4096)) - 2048, int'($urandom_range(4096)) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
