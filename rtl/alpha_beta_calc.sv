// alpha_beta_calc: stator voltage and current in the fixed alpha-beta frame.
//
// Voltage: the inverter switching state {Sa, Sb, Sc} selects, per leg, a
// constant weight, and two subtractors combine them:
//   Vs_alpha = 420.2*Sa - 210.1*Sb - 210.1*Sc
//   Vs_beta  = 363.9*Sb - 363.9*Sc
// Current: the two measured phase currents give
//   Is_alpha = 1.225*Isa
//   Is_beta  = 0.7071*Isa + 1.414*Isb
// (the power-invariant Clarke transform with ia + ib + ic = 0; the voltage
// weights are that transform of a DC link near 514.6 V).
//
// The gains and the adder/subtractor arrangement follow the design's block
// diagram. Because S is a single bit, each "gain" on a switch is realised as
// a choice between the constant and zero. Interface: all values in the
// dtc_pkg datapath format. Timing: purely combinational, no latency.
module alpha_beta_calc
  import dtc_pkg::*;
(
  input  sw_state_t sw,        // inverter switching state
  input  fix_t      isa,       // phase a current, A
  input  fix_t      isb,       // phase b current, A
  output fix_t      vs_alpha,  // V
  output fix_t      vs_beta,   // V
  output fix_t      is_alpha,  // A
  output fix_t      is_beta    // A
);

  localparam fix_t VK1 = to_fix(VK1_R);
  localparam fix_t VK2 = to_fix(VK2_R);
  localparam fix_t VK4 = to_fix(VK4_R);
  localparam gain_t IK_AA = to_gain(IK_AA_R);
  localparam gain_t IK_BA = to_gain(IK_BA_R);
  localparam gain_t IK_BB = to_gain(IK_BB_R);

  fix_t k1, k2, k3, k4, k5;

  always_comb begin
    k1 = sw.sa ? VK1 : '0;
    k2 = sw.sb ? VK2 : '0;
    k3 = sw.sc ? VK2 : '0;
    k4 = sw.sb ? VK4 : '0;
    k5 = sw.sc ? VK4 : '0;
    vs_alpha = (k1 - k2) - k3;
    vs_beta  = k4 - k5;
    is_alpha = kmul(isa, IK_AA);
    is_beta  = kmul(isa, IK_BA) + kmul(isb, IK_BB);
  end

endmodule
