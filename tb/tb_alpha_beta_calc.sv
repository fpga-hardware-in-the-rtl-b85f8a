// tb_alpha_beta_calc: checks the alpha-beta voltage and current transform
// against the power-invariant Clarke transform computed in real arithmetic
// (DC link 514.6 V), for all eight switching states and random currents.
module tb_alpha_beta_calc;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  sw_state_t sw;
  fix_t isa, isb, va, vb, ia, ib;

  alpha_beta_calc dut (.sw, .isa, .isb, .vs_alpha(va), .vs_beta(vb), .is_alpha(ia), .is_beta(ib));

  function automatic real r(fix_t v); return real'(v) / (2.0 ** DF); endfunction
  task automatic chk(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real udc, ra, rb, k;
    udc = 514.6;
    k = $sqrt(2.0 / 3.0);
    for (int s = 0; s < 8; s++) begin
      for (int n = 0; n < 20; n++) begin
        sw = sw_state_t'(s[2:0]);
        ra = ($signed($urandom_range(0, 40000)) - 20000) / 1000.0;
        rb = ($signed($urandom_range(0, 40000)) - 20000) / 1000.0;
        isa = to_fix(ra);
        isb = to_fix(rb);
        #1;
        chk("vs_alpha", r(va), k * udc * (sw.sa - 0.5 * sw.sb - 0.5 * sw.sc), 0.2);
        chk("vs_beta",  r(vb), k * udc * ($sqrt(3.0) / 2.0) * (real'(sw.sb) - real'(sw.sc)), 0.2);
        // ic = -ia - ib
        chk("is_alpha", r(ia), k * (ra - 0.5 * rb - 0.5 * (-ra - rb)), 0.02);
        chk("is_beta",  r(ib), k * ($sqrt(3.0) / 2.0) * (rb - (-ra - rb)), 0.02);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
