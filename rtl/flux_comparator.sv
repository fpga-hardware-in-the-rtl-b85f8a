// flux_comparator: two-level comparator of the stator flux magnitude.
//
// The estimated flux is subtracted from the reference and the difference
// compared with zero: the output is 1 (flux must rise) when the reference is
// above the estimate, 0 (flux must fall) otherwise. This follows the
// design's diagram, whose comparator threshold is the constant 0; no
// hysteresis band or memory is drawn, and none is added here. Interface:
// dtc_pkg datapath format in, one bit out. Timing: combinational.
module flux_comparator
  import dtc_pkg::*;
(
  input  fix_t flux_ref,    // Wb
  input  fix_t flux_est,    // Wb
  output logic cflux        // 1: increase flux, 0: decrease flux
);

  fix_t err;

  always_comb begin
    err   = flux_ref - flux_est;
    cflux = (err > 0);
  end

endmodule
