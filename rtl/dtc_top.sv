// dtc_top: complete direct torque control (DTC) of an induction machine,
// the controller side of a hardware-in-the-loop setup. The machine and the
// two-level inverter are outside: each sample the controller receives two
// phase currents and the rotor speed and returns the three inverter leg
// commands {Sa, Sb, Sc}.
//
// Three parts, as in the design: dtc_estimation (flux and torque from the
// applied switching state and the currents), dtc_switching (comparators,
// sector, Takahashi table) and speed_pi (torque reference from the speed
// error). The switching state produced by dtc_switching is also the one the
// estimator integrates, closing the loop inside the FPGA. The flux
// reference and the speed reference are inputs.
//
// Interface: plain dtc_pkg datapath words (Q11.20) in SI units; `ce` is the
// sample strobe (one Euler step of 1.001e-5 s per enabled cycle; it may be
// held high so that each clock is a sample). Timing: {Sa,Sb,Sc} is
// combinational in the speed inputs and in registered state, so it is valid
// in the cycle the inputs are; the currents act on the flux one sample
// later. Synchronous active-high reset.
module dtc_top
  import dtc_pkg::*;
#(
  parameter fix_t TQ_BAND = '0   // torque comparator band, N.m
)(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  fix_t       isa,         // phase a current, A
  input  fix_t       isb,         // phase b current, A
  input  fix_t       w,           // rotor speed, rad/s
  input  fix_t       w_ref,       // speed reference, rad/s
  input  fix_t       flux_ref,    // stator flux reference, Wb
  output sw_state_t  sw,          // inverter leg commands {Sa, Sb, Sc}
  // observation
  output fix_t       qsd,
  output fix_t       qsq,
  output fix_t       flux_mag,
  output fix_t       flux_angle,
  output fix_t       torque,
  output fix_t       torque_ref,
  output logic [2:0] sector,
  output logic       cflux,
  output tq_err_e    ctq
);

  dtc_estimation u_est (
    .clk, .rst, .ce, .sw, .isa, .isb,
    .qsd, .qsq, .flux_mag, .flux_angle, .torque
  );

  speed_pi u_pi (
    .clk, .rst, .ce, .w_ref, .w, .te_ref(torque_ref)
  );

  dtc_switching #(.TQ_BAND(TQ_BAND)) u_sw (
    .flux_angle, .flux_ref, .flux_mag, .torque_ref, .torque,
    .sw, .sector, .cflux, .ctq
  );

endmodule
