// tb_hysteresis_control: random references and measurements per phase; checks
// that the six gate signals change only on the 20-clock update grid, that on
// each update they match the per-phase decision (error > -1 LSB -> upper on)
// taken from errors held steady, and that the two switches of a leg are
// never on together.
module tb_hysteresis_control;
  import foc_pkg::*;

  int checks = 0, failures = 0, updates = 0;
  logic clk = 0, rst_n = 0;
  abc_t r = '0, m = '0;
  logic [5:0] p, p_prev;
  int cyc = 0, last_change = -1;

  hysteresis_control dut (.clk(clk), .rst_n(rst_n), .iabc_ref(r), .iabc(m), .pulses(p));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] expect_p(input abc_t rr, input abc_t mm);
    logic ua, ub, uc;
    ua = (int'(rr.a) - int'(mm.a)) > -1;
    ub = (int'(rr.b) - int'(mm.b)) > -1;
    uc = (int'(rr.c) - int'(mm.c)) > -1;
    return {~uc, uc, ~ub, ub, ~ua, ua};
  endfunction

  // Gate signals may only change on the 20-clock grid.
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (p != p_prev) begin
      if (last_change >= 0) begin
        checks++;
        if ((cyc - last_change) % 20 != 0) begin
          failures++;
          $display("FAIL hysteresis_control change after %0d clocks", cyc - last_change);
        end
      end
      last_change = cyc;
      updates++;
    end
    checks++;
    if ((p[0] && p[1]) || (p[2] && p[3]) || (p[4] && p[5])) begin
      failures++;
      $display("FAIL hysteresis_control shoot-through %b", p);
    end
    p_prev = p;
  end

  initial begin
    logic [5:0] exp_p;
    p_prev = 6'b101010;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      r.a = fx_t'(int'($urandom_range(10)) - 5);
      r.b = fx_t'(int'($urandom_range(10)) - 5);
      r.c = fx_t'(int'($urandom_range(10)) - 5);
      m.a = fx_t'(int'($urandom_range(10)) - 5);
      m.b = fx_t'(int'($urandom_range(10)) - 5);
      m.c = fx_t'(int'($urandom_range(10)) - 5);
      exp_p = expect_p(r, m);
      repeat (22) @(negedge clk);   // at least one full update period
      checks++;
      if (p != exp_p) begin
        failures++;
        $display("FAIL hysteresis_control k=%0d p=%b expected %b", k, p, exp_p);
      end
    end
    checks++;
    if (updates < 10) begin failures++; $display("FAIL too few updates %0d", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
