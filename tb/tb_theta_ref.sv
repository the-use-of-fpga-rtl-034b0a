// tb_theta_ref: random slip and rotor angles; checks the wrapped field angle
// (sum -/+ 804 beyond +/-804) exactly, and the 8-bit index against the real
// value floor(theta_e * 40.75) mod 256 and against (theta_s + theta_r) / 2*pi
// * 256 within 2 steps. Counts wraps in both directions.
module tb_theta_ref;
  import foc_pkg::*;

  int checks = 0, failures = 0, n_gt = 0, n_lt = 0;
  logic clk = 0, rst_n = 0;
  fx_t ts = '0, tr = '0, te;
  logic [7:0] idx;

  theta_ref dut (.clk(clk), .rst_n(rst_n), .theta_s(ts), .theta_r(tr),
                 .theta_e(te), .theta_idx(idx));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int s, input int r);
    int sum, w, ei, d;
    real ang;
    ts = fx_t'(s);
    tr = fx_t'(r);
    @(negedge clk);
    sum = s + r;
    w = (sum > 804) ? sum - 804 : (sum < -804) ? sum + 804 : sum;
    if (sum > 804) n_gt++;
    if (sum < -804) n_lt++;
    checks++;
    if (int'(te) != w) begin
      failures++;
      $display("FAIL theta_ref e %0d+%0d -> %0d expected %0d", s, r, te, w);
    end
    ei = int'($floor(real'(w) / 128.0 * 40.75)) & 255;
    checks++;
    if (int'(idx) != ei) begin
      failures++;
      $display("FAIL theta_ref idx %0d -> %0d expected %0d", w, idx, ei);
    end
    ang = real'(sum) / 128.0 / (2.0 * 3.14159265358979) * 256.0;
    d = (int'(idx) - (int'($floor(ang)) & 255) + 256) & 255;
    checks++;
    if (d > 2 && d < 254) begin
      failures++;
      $display("FAIL theta_ref circle %0d -> idx %0d, ideal %f", sum, idx, ang);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply(0, 0); apply(100, 800); apply(-700, 0); apply(-500, -400); apply(804, 0);
    for (int k = 0; k < 1000; k++)
      apply(int'($urandom_range(1606)) - 803, int'($urandom_range(804)));
    for (int k = 0; k < 200; k++)
      apply(-int'($urandom_range(803)), -int'($urandom_range(200)));
    checks++;
    if (n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL theta_ref wraps gt=%0d lt=%0d", n_gt, n_lt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
