// im_plant: behavioural model (not synthesizable, real arithmetic) of the
// two-level inverter and the induction machine that the DTC controller
// drives, for closed-loop testbenches.
//
// Inverter: DC link UDC; leg commands {Sa,Sb,Sc} give the stator voltage in
// the power-invariant alpha-beta frame,
//   va = sqrt(2/3)*UDC*(Sa - (Sb+Sc)/2),  vb = sqrt(2/3)*UDC*(sqrt(3)/2)*(Sb - Sc).
// Machine: flux-linkage model in the stator frame with stator flux (psa,
// psb), rotor flux (pra, prb) and mechanical speed wm:
//   d psi_s/dt = v - Rs*i_s
//   d psi_r/dt = -Rr*i_r + j*P*wm*psi_r   (rotation term in the stator frame)
//   i_s = (Lr*psi_s - Lm*psi_r)/D, i_r = (Ls*psi_r - Lm*psi_s)/D, D = Ls*Lr - Lm^2
//   Te = P*(psa*isb - psb*isa),  J*d wm/dt = Te - TL
// with Rs = 10, Rr = 6.3 ohm, Ls = 0.4642, Lr = 0.4612, Lm = 0.4212 H,
// J = 0.02 kg.m^2, P = 2 pole pairs. Each rising clock edge with `step` high
// advances the model by DT using NSUB forward-Euler sub-steps. Outputs are
// phase currents a and b, speed, torque and stator flux.
module im_plant #(
  parameter real UDC  = 514.6,
  parameter real DT   = 1.001e-5,
  parameter int  NSUB = 4
)(
  input  logic       clk,
  input  logic       step,
  input  logic [2:0] s_abc,   // {Sa, Sb, Sc}
  input  real        tl,      // load torque, N.m
  output real        ia,
  output real        ib,
  output real        wm,
  output real        te,
  output real        psa,
  output real        psb
);
  localparam real RS = 10.0, RR = 6.3, LS = 0.4642, LR = 0.4612, LM = 0.4212;
  localparam real J = 0.02, P = 2.0;
  localparam real D = LS * LR - LM * LM;

  real pra, prb, isa_, isb_, ira, irb, va, vb, h, k;

  initial begin
    psa = 0; psb = 0; pra = 0; prb = 0; wm = 0; te = 0; ia = 0; ib = 0;
  end

  always @(posedge clk) begin
    if (step) begin
      k = $sqrt(2.0 / 3.0);
      h = DT / NSUB;
      va = k * UDC * (real'(s_abc[2]) - 0.5 * real'(s_abc[1]) - 0.5 * real'(s_abc[0]));
      vb = k * UDC * ($sqrt(3.0) / 2.0) * (real'(s_abc[1]) - real'(s_abc[0]));
      for (int n = 0; n < NSUB; n++) begin
        isa_ = (LR * psa - LM * pra) / D;
        isb_ = (LR * psb - LM * prb) / D;
        ira  = (LS * pra - LM * psa) / D;
        irb  = (LS * prb - LM * psb) / D;
        te   = P * (psa * isb_ - psb * isa_);
        psa += h * (va - RS * isa_);
        psb += h * (vb - RS * isb_);
        pra += h * (-RR * ira - P * wm * prb);
        prb += h * (-RR * irb + P * wm * pra);
        wm  += h * (te - tl) / J;
      end
      isa_ = (LR * psa - LM * pra) / D;
      isb_ = (LR * psb - LM * prb) / D;
      te = P * (psa * isb_ - psb * isa_);
      ia = k * isa_;
      ib = k * (-0.5 * isa_ + ($sqrt(3.0) / 2.0) * isb_);
    end
  end
endmodule
