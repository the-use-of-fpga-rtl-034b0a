// tb_teta_position: sweeps the mechanical angle over 0 .. 2*pi and checks the
// electrical angle: exactly 2*theta_m - (2*theta_m > 804 ? 804 : 0) in units
// of 2^-7, and within 0.01 rad of (2*theta_m mod 2*pi) computed in reals.
module tb_teta_position;
  import foc_pkg::*;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int checks = 0, failures = 0, wraps = 0;
  fx_t tm, tr;

  teta_position dut (.theta_m(tm), .theta_r(tr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    real r;
    for (int v = 0; v <= 804; v++) begin
      tm = fx_t'(v);
      #1;
      exp_v = (2 * v > 804) ? 2 * v - 804 : 2 * v;
      if (2 * v > 804) wraps++;
      checks++;
      if (int'(tr) != exp_v) begin
        failures++;
        $display("FAIL teta_position %0d -> %0d expected %0d", v, tr, exp_v);
      end
      r = 2.0 * v / 128.0;
      if (r > 6.28125) r -= 6.28125;
      checks++;
      if (absr(real'(tr) / 128.0 - r) > 0.01 || tr < 0 || tr > 804) begin
        failures++;
        $display("FAIL teta_position range %0d -> %0d", v, tr);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
