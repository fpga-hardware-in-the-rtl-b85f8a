// tb_torque_estimator: streams random flux/current samples and checks that
// the torque output equals 2*(phi_d*i_q - phi_q*i_d) of the sample entered
// exactly three enabled cycles earlier; enable gaps must not advance it.
module tb_torque_estimator;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;
  fix_t qsd, isq, qsq, isd, cem;
  real hist[$];
  always #5 clk = ~clk;

  torque_estimator dut (.clk, .rst, .ce, .qsd, .isq, .qsq, .isd, .cem);

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
    real a, b, c, d;
    qsd = '0; isq = '0; qsq = '0; isd = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    hist = '{0.0, 0.0, 0.0};
    for (int n = 0; n < 2000; n++) begin
      a = ($signed($urandom_range(0, 3000)) - 1500) / 1000.0;
      b = ($signed($urandom_range(0, 4000)) - 2000) / 100.0;
      c = ($signed($urandom_range(0, 3000)) - 1500) / 1000.0;
      d = ($signed($urandom_range(0, 4000)) - 2000) / 100.0;
      qsd = to_fix(a); isq = to_fix(b); qsq = to_fix(c); isd = to_fix(d);
      ce = ($signed($urandom_range(0, 4)) != 0);
      @(posedge clk);
      #1;
      if (ce) begin
        hist.push_back(2.0 * (r(qsd) * r(isq) - r(qsq) * r(isd)));
        void'(hist.pop_front());
      end
      // hist[0] is the sample entered three enabled cycles ago
      chk("cem", r(cem), hist[0], 1e-4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
