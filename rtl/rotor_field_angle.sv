// rotor_field_angle: the "Teta" block of the indirect field-oriented controller.
//
// Forms the rotor field angle used by the dq -> abc transformation: the slip
// angle (integral of Ks * iq*) plus the electrical rotor angle (pole pairs
// times the encoder's mechanical angle), wrapped and scaled to an 8-bit
// sine/cosine table index. Timing: the slip angle moves once per control
// sample; the index follows within two clocks of it.
//
// Structure follows the reference design; the theta_s and theta_r outputs
// are added for monitoring.
module rotor_field_angle
  import foc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,         // control-sample strobe
  input  fx_t                iq,         // torque current command iq*, pu
  input  fx_t                theta_m,    // mechanical rotor angle, rad
  output fx_t                theta_s,    // slip angle, rad
  output fx_t                theta_r,    // electrical rotor angle, rad
  output fx_t                theta_e,    // field angle, rad
  output logic [THETA_W-1:0] theta_idx   // field angle table index
);

  slip_angle u_swe (
    .clk     (clk),
    .rst_n   (rst_n),
    .ce      (ce),
    .iq      (iq),
    .theta_s (theta_s)
  );

  teta_position u_pos (
    .theta_m (theta_m),
    .theta_r (theta_r)
  );

  theta_ref u_ref (
    .clk       (clk),
    .rst_n     (rst_n),
    .theta_s   (theta_s),
    .theta_r   (theta_r),
    .theta_e   (theta_e),
    .theta_idx (theta_idx)
  );

endmodule
