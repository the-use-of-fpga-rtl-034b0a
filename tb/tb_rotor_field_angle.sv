// tb_rotor_field_angle: runs the slip integrator with a constant torque
// current and a rotating encoder angle, and checks the field angle and its
// 8-bit index against a testbench model of slip angle + 2 * mechanical angle
// with both wrap rules, and against the real-valued angle within 2 steps.
module tb_rotor_field_angle;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0;
  fx_t iq = '0, tm = '0, te, ts_o, tr_o;
  logic [7:0] idx;
  longint acc = 0;
  localparam longint LIM = 804 * 128;

  rotor_field_angle dut (.clk(clk), .rst_n(rst_n), .ce(ce), .iq(iq), .theta_m(tm),
                         .theta_s(ts_o), .theta_r(tr_o),
                         .theta_e(te), .theta_idx(idx));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ts, tr, sum, w, ei, d, mech;
    real ideal;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mech = 0;
    for (int k = 0; k < 600; k++) begin
      iq = fx_t'((k < 300) ? 150 : -120);
      mech = (mech + 37) % 804;
      tm = fx_t'(mech);
      ce = 1; @(negedge clk); ce = 0;
      repeat (4) @(negedge clk);
      acc = ((acc > LIM || acc < -LIM) ? 0 : acc) + ((longint'(iq) * 1971) >>> 7);
      ts = int'(((acc > LIM || acc < -LIM) ? 0 : acc) >>> 7);
      tr = (2 * mech > 804) ? 2 * mech - 804 : 2 * mech;
      checks++;
      if (int'(ts_o) != ts || int'(tr_o) != tr) begin
        failures++;
        $display("FAIL rfa k=%0d theta_s=%0d (%0d) theta_r=%0d (%0d)", k, ts_o, ts, tr_o, tr);
      end
      sum = ts + tr;
      w = (sum > 804) ? sum - 804 : (sum < -804) ? sum + 804 : sum;
      checks++;
      if (int'(te) != w) begin
        failures++;
        $display("FAIL rfa k=%0d theta_e=%0d expected %0d", k, te, w);
      end
      ei = int'($floor(real'(w) / 128.0 * 40.75)) & 255;
      ideal = real'(sum) / 128.0 / (2.0 * 3.14159265358979) * 256.0;
      d = (int'(idx) - (int'($floor(ideal)) & 255) + 256) & 255;
      checks++;
      if (int'(idx) != ei || (d > 2 && d < 254)) begin
        failures++;
        $display("FAIL rfa k=%0d idx=%0d expected %0d", k, idx, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
