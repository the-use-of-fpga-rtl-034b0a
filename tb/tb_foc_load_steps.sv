// tb_foc_load_steps: closed-loop run of the complete controller at its default
// parameters through 4.0 s: speed reference +0.7 pu for 2 s then -0.7 pu,
// load torque 0 / +1.0 / 0 / -1.0 pu in one-second steps. The controller, the
// plant model and all checks are in foc_loop_harness (profile 1); this module
// reports the result.
module tb_foc_load_steps;

  logic done;
  int checks, failures;

  foc_loop_harness #(.PROFILE(1)) h (.done(done), .checks(checks), .failures(failures));

  initial begin
    #(64'd18_000_000);   // 1.8 million clocks of 10 time units: watchdog
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
