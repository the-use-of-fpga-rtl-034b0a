// tb_dq_abc_subsystem: feeds a new random (iq, id, angle) every clock and
// checks, three clocks later, the phase commands against the real-valued
// inverse Park and inverse Clarke transforms (tolerance 4 LSB) and that the
// three phases sum to about zero. The three-clock latency is checked by
// comparing with the inputs applied exactly three clocks earlier.
module tb_dq_abc_subsystem;
  import foc_pkg::*;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  fx_t iq = '0, id = '0, s = '0, c = '0;
  abc_t o;
  real ea [4], eb [4], ec [4];

  dq_abc_subsystem dut (.clk(clk), .rst_n(rst_n), .iq(iq), .sin_i(s), .id(id),
                        .cos_i(c), .iabc(o));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit far(input fx_t v, input real r);
    return absr(real'(v) / 128.0 - r) > 4.0 / 128.0;
  endfunction

  initial begin
    real a, q, d, qs, ds;
    int sum3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      a  = 2.0 * 3.14159265358979 * $urandom_range(255) / 256.0;
      iq = fx_t'(int'($urandom_range(362)) - 181);
      id = fx_t'(int'($urandom_range(240)) - 120);
      s  = fx_t'(int'($floor(128.0 * $sin(a) + 0.5)));
      c  = fx_t'(int'($floor(128.0 * $cos(a) + 0.5)));
      q  = real'(iq) / 128.0;
      d  = real'(id) / 128.0;
      qs = q * $cos(a) + d * $sin(a);
      ds = d * $cos(a) - q * $sin(a);
      ea[k % 4] = qs;
      eb[k % 4] = -0.5 * qs - 0.8660254 * ds;
      ec[k % 4] = -0.5 * qs + 0.8660254 * ds;
      @(negedge clk);
      // one rising edge has passed since step k's inputs, so the output
      // now shows the inputs of step k-2, applied three rising edges ago
      if (k >= 2) begin
        checks++;
        if (far(o.a, ea[(k - 2) % 4]) || far(o.b, eb[(k - 2) % 4]) ||
            far(o.c, ec[(k - 2) % 4])) begin
          failures++;
          $display("FAIL dq_abc k=%0d a=%0d b=%0d c=%0d exp %f %f %f", k, o.a, o.b, o.c,
                   ea[(k - 2) % 4], eb[(k - 2) % 4], ec[(k - 2) % 4]);
        end
        checks++;
        sum3 = int'(o.a) + int'(o.b) + int'(o.c);
        if (sum3 > 4 || sum3 < -4) begin
          failures++;
          $display("FAIL dq_abc sum k=%0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
