// flux_estimator: stator flux in the alpha-beta frame by Euler integration
// of the back-EMF,
//   phi[n+1] = phi[n] + Ts * (Vs[n] - Rs * Is[n]),   Ts = 1.001e-5 s, Rs = 10 ohm,
// one accumulator per axis (d = alpha, q = beta).
//
// Each axis is a subtractor, a gain Rs on the current, a gain Ts on the
// difference, an adder and a one-sample delay whose output is the flux, as
// in the design's diagram. The clock-enable `ce` marks a sample: the
// accumulators move only when it is high, so the Euler step equals one
// enable period. Synchronous active-high reset clears the flux to zero
// (the reset behaviour is this design's choice). Interface: dtc_pkg
// datapath format. Timing: the outputs are registers; a new input affects
// them one sample later.
module flux_estimator
  import dtc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  fix_t vsd,   // Vs alpha, V
  input  fix_t isd,   // Is alpha, A
  input  fix_t vsq,   // Vs beta, V
  input  fix_t isq,   // Is beta, A
  output fix_t qsd,   // stator flux alpha, Wb
  output fix_t qsq    // stator flux beta, Wb
);

  localparam gain_t RS = to_gain(RS_R);
  localparam gain_t TS = to_gain(TS_R);

  fix_t emf_d, emf_q;

  always_comb begin
    emf_d = vsd - kmul(isd, RS);
    emf_q = vsq - kmul(isq, RS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      qsd <= '0;
      qsq <= '0;
    end else if (ce) begin
      qsd <= qsd + kmul(emf_d, TS);
      qsq <= qsq + kmul(emf_q, TS);
    end
  end

endmodule
