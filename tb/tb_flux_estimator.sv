// tb_flux_estimator: drives random voltages and currents, with the sample
// enable sometimes low, and compares the flux with a real-valued Euler
// integrator phi += Ts*(V - Rs*I). Also checks the one-sample latency and
// that the flux holds while the enable is low.
module tb_flux_estimator;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;
  fix_t vsd, isd, vsq, isq, qsd, qsq;
  always #5 clk = ~clk;

  flux_estimator dut (.clk, .rst, .ce, .vsd, .isd, .vsq, .isq, .qsd, .qsq);

  function automatic real r(fix_t v); return real'(v) / (2.0 ** DF); endfunction
  task automatic chk(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ed, eq, rvd, rid, rvq, riq;
    ed = 0; eq = 0;
    vsd = '0; isd = '0; vsq = '0; isq = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk("reset d", r(qsd), 0.0, 0.0);
    chk("reset q", r(qsq), 0.0, 0.0);
    for (int n = 0; n < 3000; n++) begin
      rvd = ($signed($urandom_range(0, 840)) - 420.0);
      rvq = ($signed($urandom_range(0, 728)) - 364.0);
      rid = ($signed($urandom_range(0, 4000)) - 2000) / 100.0;
      riq = ($signed($urandom_range(0, 4000)) - 2000) / 100.0;
      vsd = to_fix(rvd); isd = to_fix(rid); vsq = to_fix(rvq); isq = to_fix(riq);
      ce = ($signed($urandom_range(0, 3)) != 0);
      @(posedge clk);
      #1;
      if (ce) begin
        ed += 1.001e-5 * (rvd - 10.0 * rid);
        eq += 1.001e-5 * (rvq - 10.0 * riq);
      end
      chk("qsd", r(qsd), ed, 2e-3);
      chk("qsq", r(qsq), eq, 2e-3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
