// foc_pkg: number format and constants shared by the field-oriented controller.
//
// Every signal of the controller datapath is a signed fixed-point number with
// 14 bits, 7 of them fractional (written 14_7: range -64 .. +63.992, one LSB
// is 2^-7 = 0.0078125). Speeds, torques and currents are in per unit, angles
// in radians. Each constant below is the nearest 14_7 value of the figure
// given for the controller (1.2 pu torque limit, 2*pi = 6.28125, 40.75 for the
// radian-to-table-index scaling, and so on); the value in the comment is the
// real number it stands for. The integration step dt is the format's LSB,
// 2^-7 s, so multiplying by dt is an arithmetic shift by 7.
package foc_pkg;

  localparam int FX_W    = 14;  // word width of the 14_7 format
  localparam int FX_FRAC = 7;   // fractional bits of the 14_7 format

  typedef logic signed [FX_W-1:0] fx_t;

  // Wide signed word, still with 7 fractional bits, for the speed regulator
  // between the gains and the torque limiter (nothing there may wrap).
  localparam int WIDE_W = 26;
  typedef logic signed [WIDE_W-1:0] wide_t;

  // Three-phase quantity (phase a, b, c).
  typedef struct packed {
    fx_t a;
    fx_t b;
    fx_t c;
  } abc_t;

  // Constants as integers in units of 2^-7.
  localparam fx_t TWO_PI_Q7    = 14'sd804;  // 6.28125  (2*pi)
  localparam fx_t TLIM_Q7      = 14'sd154;  // 1.203125 (torque limit 1.2 pu)
  localparam fx_t IQ_GAIN_Q7   = 14'sd151;  // 1.1796875 (torque -> iq* gain 1.18)
  localparam fx_t ID_REF_Q7    = 14'sd120;  // 0.9375   (flux current command)
  localparam fx_t KS_Q7        = 14'sd1971; // 15.3984  (slip gain Ks = 15.4)
  localparam fx_t SQRT3_Q7     = 14'sd221;  // 1.7265625 (sqrt(3), printed 1.727)
  localparam fx_t THSCALE_Q7   = 14'sd5216; // 40.75    (256 / 2*pi)
  localparam fx_t HBAND_Q7     = 14'sd1;    // 0.0078125 (hysteresis threshold)

  localparam int  KP           = 35;        // proportional gain K1
  localparam int  KI           = 5;         // integral gain KI
  localparam int  DT_SHIFT     = 7;         // dt = 2^-7 s = 0.0078125 s
  localparam int  POLE_PAIRS   = 2;         // pole pairs of the machine
  localparam int  THETA_W      = 8;         // sine/cosine table address width

endpackage
