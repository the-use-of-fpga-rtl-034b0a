// tb_hysteresis_phase: random and boundary current errors; one clock later
// the upper switch must be on exactly when error > 0.0078125 or
// error > -0.0078125, and the lower switch must be its complement.
module tb_hysteresis_phase;
  import foc_pkg::*;

  int checks = 0, failures = 0, n_up = 0, n_dn = 0;
  logic clk = 0, rst_n = 0;
  fx_t e = '0;
  logic up, dn;

  hysteresis_phase dut (.clk(clk), .rst_n(rst_n), .err(e), .upper(up), .lower(dn));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    logic exp_up;
    e = fx_t'(v);
    @(negedge clk);
    exp_up = (v > 1) || (v > -1);
    if (exp_up) n_up++; else n_dn++;
    checks++;
    if (up !== exp_up || dn !== !exp_up) begin
      failures++;
      $display("FAIL hysteresis_phase e=%0d up=%b dn=%b", v, up, dn);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply(-2); apply(-1); apply(0); apply(1); apply(2); apply(-100); apply(100);
    for (int k = 0; k < 400; k++) apply(int'($urandom_range(20)) - 10);
    checks++;
    if (n_up == 0 || n_dn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
