// hysteresis_control: current-controlled switching of the three-phase inverter.
//
// For each phase the measured current is subtracted from its reference and
// the error goes to a hysteresis_phase comparator, which runs at the clock
// rate (400 kHz in the reference configuration). The six switch signals are
// then sampled into an output register once every DIV clocks, which reduces
// the switching rate to 400 kHz / 20 = 20 kHz; DIV is a parameter because the
// rate is meant to be chosen by the user. Output order: pulses[0] phase a
// upper, [1] a lower, [2] b upper, [3] b lower, [4] c upper, [5] c lower.
// Timing: 1 clock of comparator latency, then up to DIV clocks until the next
// output update. Reset turns all upper switches off and all lower ones on.
//
// Error formation, the three legs and the 400 kHz -> 20 kHz reduction
// follow the reference design; realising the reduction as an output register
// loaded every DIV clocks, the output order and the reset state are choices
// made here. The assertions use rst_n synchronously (disable iff) while the
// flops use it asynchronously; lint reports this and it is intended.
module hysteresis_control
  import foc_pkg::*;
#(
  parameter int DIV = 20          // clocks per output update (400 kHz -> 20 kHz)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  abc_t       iabc_ref,    // phase current commands, pu
  input  abc_t       iabc,        // measured phase currents, pu
  output logic [5:0] pulses       // inverter gate signals
);

  abc_t err;
  logic [5:0] raw;
  logic [$clog2(DIV+1)-1:0] cnt;

  always_comb begin
    err.a = iabc_ref.a - iabc.a;
    err.b = iabc_ref.b - iabc.b;
    err.c = iabc_ref.c - iabc.c;
  end

  hysteresis_phase u_a (.clk(clk), .rst_n(rst_n), .err(err.a), .upper(raw[0]), .lower(raw[1]));
  hysteresis_phase u_b (.clk(clk), .rst_n(rst_n), .err(err.b), .upper(raw[2]), .lower(raw[3]));
  hysteresis_phase u_c (.clk(clk), .rst_n(rst_n), .err(err.c), .upper(raw[4]), .lower(raw[5]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      pulses <= 6'b101010;
    end else begin
      if (cnt == $bits(cnt)'(DIV - 1)) begin
        cnt    <= '0;
        pulses <= raw;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  for (genvar ph = 0; ph < 3; ph++) begin : g_leg
    a_no_shoot : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(pulses[2*ph] && pulses[2*ph+1]))
      else $error("hysteresis_control: both switches of leg %0d on", ph);
  end

endmodule
