// dtc_pkg: number formats, constants and small arithmetic helpers shared by
// the direct-torque-control (DTC) datapath.
//
// All physical quantities (volts, amps, webers, newton-metres, rad/s) travel
// between blocks as signed two's-complement fixed point, DW bits with DF
// fractional bits (Q11.20 by default: +/-2048 with a resolution near 1e-6).
// Gains are held as KW-bit signed constants with KF fractional bits and
// applied with kmul(), which multiplies and rounds away the KF fraction
// bits to the nearest datapath step, so that the integrators do not drift.
// The CORDIC works on 16-bit ports (the width the design gives its CORDIC);
// they carry CF fractional bits, so flux and angle in radians fit in +/-8.
//
// The gain values are those printed on the design's block diagrams (Ts,
// Rs, the alpha-beta voltage and current gains, the CORDIC scale 0.6073,
// the sector constants, Kp, Ki). The word widths and fraction positions are
// this design's own choice; the source gives no data types.
package dtc_pkg;

  // ---------------------------------------------------------------- formats
  localparam int DW = 32;  // datapath word
  localparam int DF = 20;  // datapath fraction bits
  localparam int KW = 48;  // gain constant word
  localparam int KF = 32;  // gain constant fraction bits
  localparam int CW = 16;  // CORDIC port width
  localparam int CF = 12;  // CORDIC port fraction bits (flux and radians)

  typedef logic signed [DW-1:0] fix_t;
  typedef logic signed [KW-1:0] gain_t;
  typedef logic signed [CW-1:0] cfix_t;

  // Real value to gain constant (elaboration time only).
  function automatic gain_t to_gain(real r);
    return gain_t'(longint'(r * (2.0 ** KF)));
  endfunction

  // Real value to datapath word (elaboration time and testbenches).
  function automatic fix_t to_fix(real r);
    return fix_t'(longint'(r * (2.0 ** DF)));
  endfunction

  // Constant-gain multiply: x * k, keeping the datapath format, rounded to
  // nearest (half an LSB is added before the fraction bits are dropped).
  function automatic fix_t kmul(fix_t x, gain_t k);
    logic signed [DW+KW-1:0] p;
    p = (DW+KW)'(x) * (DW+KW)'(k) + ((DW+KW)'(1) <<< (KF - 1));
    return fix_t'(p >>> KF);
  endfunction

  // Product of two datapath words, kept in the datapath format.
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*DW-1:0] p;
    p = (2*DW)'(a) * (2*DW)'(b);
    return fix_t'(p >>> DF);
  endfunction

  // ------------------------------------------------ gains from the diagrams
  // Sample period of the Euler integrators (flux estimator and speed PI).
  localparam real TS_R = 1.001e-5;
  // Stator resistance, ohm (also Table of motor parameters: Rs = 10).
  localparam real RS_R = 10.0;
  // Switching state to alpha-beta stator voltage (volts per switch level).
  localparam real VK1_R = 420.2;   // Sa weight on V alpha
  localparam real VK2_R = 210.1;   // Sb and Sc weight on V alpha
  localparam real VK4_R = 363.9;   // Sb and Sc weight on V beta
  // Phase currents a, b to alpha-beta (power-invariant transform).
  localparam real IK_AA_R = 1.225;   // Isa -> Is alpha
  localparam real IK_BA_R = 0.7071;  // Isa -> Is beta
  localparam real IK_BB_R = 1.414;   // Isb -> Is beta
  // Torque gain after the cross product.
  localparam real TQ_K_R = 2.0;
  // CORDIC scale factor for 10 iterations.
  localparam real ZN_R = 0.6073;
  // Sector selection: 2*pi as printed, and 6/(2*pi).
  localparam real TWO_PI_R = 6.28125;
  localparam real SEC_K_R = 0.9549;
  // Speed PI regulator.
  localparam real KP_R = 1.0;
  localparam real KI_R = 8.0;

  // ------------------------------------------------------- shared encodings
  // Torque comparator output, 2 bits, as the switching table reads it.
  typedef enum logic [1:0] {
    TQ_DEC  = 2'd0,  // torque must fall      (Te = -1)
    TQ_HOLD = 2'd1,  // torque is on target   (Te =  0)
    TQ_INC  = 2'd2   // torque must rise      (Te = +1)
  } tq_err_e;

  // Inverter switching state {Sa, Sb, Sc}; 1 = upper switch of the leg on.
  typedef struct packed {
    logic sa;
    logic sb;
    logic sc;
  } sw_state_t;

endpackage
