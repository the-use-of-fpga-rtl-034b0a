// tb_dq_abc: holds (angle index, iq, id) for four clocks and checks the phase
// commands against the real-valued transform of the same angle (tolerance
// 5 LSB), over all 256 angles and random currents.
module tb_dq_abc;
  import foc_pkg::*;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] th = '0;
  fx_t iq = '0, id = '0;
  abc_t o;

  dq_abc dut (.clk(clk), .rst_n(rst_n), .theta_idx(th), .iq(iq), .id(id), .iabc(o));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit far(input fx_t v, input real r);
    return absr(real'(v) / 128.0 - r) > 5.0 / 128.0;
  endfunction

  initial begin
    real a, q, d, qs, ds, ra, rb, rc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 512; k++) begin
      th = 8'(k);
      iq = fx_t'(int'($urandom_range(362)) - 181);
      id = (k < 256) ? ID_REF_Q7 : fx_t'(int'($urandom_range(240)) - 120);
      repeat (4) @(negedge clk);
      a  = 2.0 * 3.14159265358979 * (k % 256) / 256.0;
      q  = real'(iq) / 128.0;
      d  = real'(id) / 128.0;
      qs = q * $cos(a) + d * $sin(a);
      ds = d * $cos(a) - q * $sin(a);
      ra = qs;
      rb = -0.5 * qs - 0.8660254 * ds;
      rc = -0.5 * qs + 0.8660254 * ds;
      checks++;
      if (far(o.a, ra) || far(o.b, rb) || far(o.c, rc)) begin
        failures++;
        $display("FAIL dq_abc k=%0d got %0d %0d %0d exp %f %f %f", k, o.a, o.b, o.c,
                 ra * 128, rb * 128, rc * 128);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
