// speed_pi: proportional-integral speed regulator that produces the torque
// reference of the DTC loop,
//   e = w_ref - w,   acc[n+1] = acc[n] + dt * e,   Te_ref = Kp*e + Ki*acc[n],
// with Kp = 1, Ki = 8 and dt = 1.001e-5 s.
//
// The proportional path is a constant gain on the error; the integral path
// is an Euler integrator (gain dt, adder, one-sample delay) followed by the
// gain Ki, and an adder sums the two, as in the design's diagram. No output
// limit or anti-windup is drawn and none is added. The integrator advances
// on the sample enable `ce` and is cleared by the synchronous active-high
// reset (this design's choice). Interface: dtc_pkg datapath format, speeds
// in rad/s and torque in N.m. Timing: Te_ref is combinational in the speeds
// and in the registered integral.
module speed_pi
  import dtc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  fix_t w_ref,   // rad/s
  input  fix_t w,       // rad/s
  output fix_t te_ref   // N.m
);

  localparam gain_t KP = to_gain(KP_R);
  localparam gain_t KI = to_gain(KI_R);
  localparam gain_t DT = to_gain(TS_R);

  fix_t err, acc;

  assign err    = w_ref - w;
  assign te_ref = kmul(err, KP) + kmul(acc, KI);

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (ce) acc <= acc + kmul(err, DT);
  end

endmodule
