// dtc_estimation: the estimation part of the DTC controller. From the
// inverter switching state and two measured phase currents it estimates
// the stator flux vector, its magnitude and angle, and the electromagnetic
// torque.
//
// Chain: alpha_beta_calc (voltages from {Sa,Sb,Sc}, currents from Isa,
// Isb) -> flux_estimator (Euler integrators) -> torque_estimator (cross
// product) and cordic (magnitude and angle). The CORDIC magnitude is
// multiplied by the scale factor Zn = 0.6073 as in the design. The flux
// enters the 16-bit CORDIC ports rounded down to CF fraction bits and
// saturated; the angle and magnitude return to the datapath format, so
// their lowest DF-CF bits are always zero (this
// conversion is this design's choice; the design gives no data types).
// Interface: dtc_pkg datapath format. Timing: all blocks advance on the
// sample enable `ce`. The flux is registered (1 sample after its inputs),
// the torque 3 samples after the flux, the angle and magnitude 11 samples
// after the flux.
module dtc_estimation
  import dtc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      ce,
  input  sw_state_t sw,          // switching state applied to the inverter
  input  fix_t      isa,         // A
  input  fix_t      isb,         // A
  output fix_t      qsd,         // flux alpha, Wb
  output fix_t      qsq,         // flux beta, Wb
  output fix_t      flux_mag,    // Wb
  output fix_t      flux_angle,  // rad
  output fix_t      torque       // N.m
);

  localparam gain_t ZN = to_gain(ZN_R);
  localparam int    SH = DF - CF;
  localparam fix_t  CMAX = fix_t'((longint'(1) <<< (CW - 1)) - 1);
  localparam fix_t  CMIN = -fix_t'(longint'(1) <<< (CW - 1));

  fix_t vs_alpha, vs_beta, is_alpha, is_beta;

  alpha_beta_calc u_ab (
    .sw, .isa, .isb,
    .vs_alpha, .vs_beta, .is_alpha, .is_beta
  );

  flux_estimator u_flux (
    .clk, .rst, .ce,
    .vsd(vs_alpha), .isd(is_alpha), .vsq(vs_beta), .isq(is_beta),
    .qsd, .qsq
  );

  torque_estimator u_torque (
    .clk, .rst, .ce,
    .qsd, .isq(is_beta), .qsq, .isd(is_alpha),
    .cem(torque)
  );

  // Datapath -> CORDIC port format, with saturation.
  function automatic cfix_t to_cport(fix_t v);
    fix_t s;
    s = v >>> SH;
    if (s > CMAX)      return cfix_t'(CMAX);
    else if (s < CMIN) return cfix_t'(CMIN);
    else               return cfix_t'(s);
  endfunction

  cfix_t c_d, c_q, c_mag, c_ang;

  assign c_d = to_cport(qsd);
  assign c_q = to_cport(qsq);

  cordic u_cordic (
    .clk, .rst, .ce,
    .qsd(c_d), .qsq(c_q),
    .magnitude(c_mag), .angle_q(c_ang)
  );

  assign flux_mag   = kmul(fix_t'(c_mag) <<< SH, ZN);
  assign flux_angle = fix_t'(c_ang) <<< SH;

endmodule
