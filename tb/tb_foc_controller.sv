// tb_foc_controller: closed-loop run of the complete controller at its default
// parameters (400 kHz clock, 3125 clocks per control sample, 20-clock gate
// update) through 4.5 s of operation: speed reference +0.7 pu for 2 s then
// -0.7 pu, load torque 0 / +1.0 / 0 / -1.0 pu over 0-1, 1-2, 2-3.5 and
// 3.5-4.5 s. The controller, the plant model and all checks are in
// foc_loop_harness (profile 0); this module reports the result.
module tb_foc_controller;

  logic done;
  int checks, failures;

  foc_loop_harness #(.PROFILE(0)) h (.done(done), .checks(checks), .failures(failures));

  initial begin
    #(64'd20_000_000);   // 2 million clocks of 10 time units: watchdog
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
