// sincos: sine and cosine of the 8-bit field angle index.
//
// A 256-entry table holds round(128 * sin(2*pi*k/256)), a 9-bit signed value
// with 7 fractional bits (format 9_7, range -1.0 .. +1.0). The sine is the
// entry at the index, the cosine the entry a quarter turn (64) further on;
// both are sign-extended to the 14_7 format of the following blocks. The table
// is computed at elaboration from the formula above. The read is
// combinational (an asynchronous-read ROM).
//
// The index and output formats follow the reference design; the table
// contents, rounding and combinational read are choices made here.
module sincos
  import foc_pkg::*;
(
  input  logic [THETA_W-1:0] theta,   // angle, 256 steps per turn
  output fx_t                sin_o,   // sin(theta), 14_7
  output fx_t                cos_o    // cos(theta), 14_7
);

  localparam int N = 2**THETA_W;

  typedef logic signed [8:0] tab_t [N];

  function automatic tab_t make_table();
    tab_t t;
    for (int k = 0; k < N; k++)
      t[k] = 9'($rtoi($floor(128.0 * $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
    return t;
  endfunction

  localparam tab_t TABLE = make_table();

  logic [THETA_W-1:0] theta_c;

  always_comb begin
    theta_c = theta + THETA_W'(N / 4);
    sin_o   = fx_t'(TABLE[theta]);
    cos_o   = fx_t'(TABLE[theta_c]);
  end

endmodule
