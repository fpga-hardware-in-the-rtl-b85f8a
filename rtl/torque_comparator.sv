// torque_comparator: three-level comparator of the electromagnetic torque.
//
// The estimate is subtracted from the reference. The error e is compared
// with +BAND and -BAND and the two comparison bits select one of three
// codes for the switching table:
//   e >  BAND          -> TQ_INC  (2, torque must rise, Te = +1)
//   -BAND <= e <= BAND -> TQ_HOLD (1, zero voltage vector, Te = 0)
//   e < -BAND          -> TQ_DEC  (0, torque must fall, Te = -1)
// The two comparators, the concatenation and the 0/1/2 output constants
// follow the design's diagram, whose comparator thresholds print as 0, so
// BAND defaults to 0. How the two comparator bits are formed is this
// design's reading: the first tests e > BAND, the second e >= -BAND.
// Interface: dtc_pkg datapath format in, tq_err_e out. Timing:
// combinational.
module torque_comparator
  import dtc_pkg::*;
#(
  parameter fix_t BAND = '0   // half-width of the zero-vector band, N.m
)(
  input  fix_t    torque_ref,  // N.m
  input  fix_t    torque_est,  // N.m
  output tq_err_e ctq
);

  fix_t err;
  logic hi, lo;

  always_comb begin
    err = torque_ref - torque_est;
    hi  = (err > BAND);
    lo  = (err >= -BAND);
    unique case ({hi, lo})
      2'b11:   ctq = TQ_INC;
      2'b01:   ctq = TQ_HOLD;
      default: ctq = TQ_DEC;
    endcase
  end

endmodule
