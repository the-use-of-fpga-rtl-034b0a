// tb_sincos: all 256 angles; sine and cosine must equal round(128*sin) and
// round(128*cos) of 2*pi*k/256 computed in the testbench, and
// sin^2 + cos^2 must stay within 2% of 1.
module tb_sincos;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] th;
  fx_t s, c;

  sincos dut (.theta(th), .sin_o(s), .cos_o(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, m;
    int es, ec;
    for (int k = 0; k < 256; k++) begin
      th = 8'(k);
      #1;
      a  = 2.0 * 3.14159265358979 * k / 256.0;
      es = int'($floor(128.0 * $sin(a) + 0.5));
      ec = int'($floor(128.0 * $cos(a) + 0.5));
      checks++;
      if (int'(s) != es || int'(c) != ec) begin
        failures++;
        $display("FAIL sincos k=%0d sin=%0d (%0d) cos=%0d (%0d)", k, s, es, c, ec);
      end
      m = (real'(s) * s + real'(c) * c) / 16384.0;
      checks++;
      if (m < 0.98 || m > 1.02) begin
        failures++;
        $display("FAIL sincos magnitude k=%0d %f", k, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
