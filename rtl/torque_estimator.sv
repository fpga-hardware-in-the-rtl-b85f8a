// torque_estimator: electromagnetic torque from stator flux and current,
//   Cem = 2 * (phi_d * is_q - phi_q * is_d).
//
// Two multipliers, each with a latency of three samples, feed a subtractor
// and a constant gain of 2 (the pole-pair number in the power-invariant
// frame), following the design's diagram. The multiplier pipelines advance
// on the sample enable `ce`; reset clears them (this design's choice).
// Interface: dtc_pkg datapath format. Timing: Cem follows its inputs by
// exactly three enabled cycles; the subtractor and gain are combinational.
module torque_estimator
  import dtc_pkg::*;
#(
  parameter int MUL_LAT = 3  // multiplier latency in samples
)(
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  fix_t qsd,   // flux alpha, Wb
  input  fix_t isq,   // current beta, A
  input  fix_t qsq,   // flux beta, Wb
  input  fix_t isd,   // current alpha, A
  output fix_t cem    // torque, N.m
);

  localparam gain_t TQ_K = to_gain(TQ_K_R);

  fix_t pd [MUL_LAT];
  fix_t pq [MUL_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < MUL_LAT; i++) begin
        pd[i] <= '0;
        pq[i] <= '0;
      end
    end else if (ce) begin
      pd[0] <= fmul(qsd, isq);
      pq[0] <= fmul(qsq, isd);
      for (int i = 1; i < MUL_LAT; i++) begin
        pd[i] <= pd[i-1];
        pq[i] <= pq[i-1];
      end
    end
  end

  assign cem = kmul(pd[MUL_LAT-1] - pq[MUL_LAT-1], TQ_K);

endmodule
