// dtc_switching: the switching part of the DTC controller. It compares the
// estimated flux magnitude and torque with their references, finds the
// sector of the flux angle and reads the inverter switching state from the
// Takahashi table.
//
// Blocks: flux_comparator (2 levels), torque_comparator (3 levels),
// sector_select and switching_table, wired as in the design. The torque
// band of the comparator is a parameter (0 by default, as drawn).
// Interface: dtc_pkg datapath format in; {Sa,Sb,Sc} out, plus the internal
// decisions for observation. Timing: combinational from input to output.
module dtc_switching
  import dtc_pkg::*;
#(
  parameter fix_t TQ_BAND = '0   // N.m
)(
  input  fix_t       flux_angle,  // rad
  input  fix_t       flux_ref,    // Wb
  input  fix_t       flux_mag,    // Wb
  input  fix_t       torque_ref,  // N.m
  input  fix_t       torque,      // N.m
  output sw_state_t  sw,          // {Sa, Sb, Sc}
  output logic [2:0] sector,
  output logic       cflux,
  output tq_err_e    ctq
);

  flux_comparator u_fcmp (
    .flux_ref, .flux_est(flux_mag), .cflux
  );

  torque_comparator #(.BAND(TQ_BAND)) u_tcmp (
    .torque_ref, .torque_est(torque), .ctq
  );

  sector_select u_sec (
    .angle(flux_angle), .sector
  );

  switching_table u_tab (
    .cflux, .ctq, .sector, .sw
  );

endmodule
