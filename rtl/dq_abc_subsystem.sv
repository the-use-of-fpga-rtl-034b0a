// dq_abc_subsystem: inverse Park followed by inverse Clarke transformation.
//
// From the synchronous-frame current commands iq*, id* and the sine and
// cosine of the field angle it forms the stationary-frame commands
//   iqs = iq*cos + id*sin,   ids = id*cos - iq*sin          (inverse Park)
//   ia  = iqs
//   ib  = 0.5 * (-1.727*ids - iqs)
//   ic  = 0.5 * ( 1.727*ids - iqs)                           (inverse Clarke)
// where 1.727 stands for sqrt(3). The four products go through three
// pipeline registers (latency 3 clocks); the sums and the constant gains after
// them are combinational, so the phase commands lag the inputs by 3 clocks.
// Products are truncated back to 14_7. Reset clears the pipeline.
//
// Equations, constants and the 3-clock multiplier latency follow the
// reference design; truncating rounding is a choice made here.
module dq_abc_subsystem
  import foc_pkg::*;
#(
  parameter int MULT_LAT = 3     // multiplier pipeline depth, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  fx_t  iq,      // In1: torque current command, pu
  input  fx_t  sin_i,   // In2: sin(theta_e)
  input  fx_t  id,      // In3: flux current command, pu
  input  fx_t  cos_i,   // In4: cos(theta_e)
  output abc_t iabc     // phase current commands, pu
);

  typedef logic signed [2*FX_W-1:0] prod_t;
  typedef fx_t quad_t [4];

  quad_t prod;
  quad_t pipe [MULT_LAT];

  function automatic fx_t mul(input fx_t a, input fx_t b);
    prod_t p;
    p = prod_t'(a) * prod_t'(b);
    return fx_t'(p >>> FX_FRAC);
  endfunction

  always_comb begin
    prod[0] = mul(cos_i, iq);   // Mult
    prod[1] = mul(sin_i, id);   // Mult1
    prod[2] = mul(cos_i, id);   // Mult2
    prod[3] = mul(sin_i, iq);   // Mult3
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MULT_LAT; s++) pipe[s] <= '{default: '0};
    end else begin
      pipe[0] <= prod;
      for (int s = 1; s < MULT_LAT; s++) pipe[s] <= pipe[s-1];
    end
  end

  fx_t iqs, ids, k_pos, k_neg, d_b, d_c;

  always_comb begin
    iqs    = pipe[MULT_LAT-1][0] + pipe[MULT_LAT-1][1];
    ids    = pipe[MULT_LAT-1][2] - pipe[MULT_LAT-1][3];
    k_pos  = mul(SQRT3_Q7, ids);
    k_neg  = mul(-SQRT3_Q7, ids);
    d_c    = k_pos - iqs;
    d_b    = k_neg - iqs;
    iabc.a = iqs;
    iabc.b = d_b >>> 1;
    iabc.c = d_c >>> 1;
  end

endmodule
