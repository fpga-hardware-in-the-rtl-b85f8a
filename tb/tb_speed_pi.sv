// tb_speed_pi: random speed reference and speed with enable gaps; compares
// the torque reference with a real-valued PI (Kp = 1, Ki = 8, Euler step
// 1.001e-5 s) and checks that the integral holds while the enable is low.
module tb_speed_pi;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;
  fix_t w_ref, w, te_ref;
  always #5 clk = ~clk;

  speed_pi dut (.clk, .rst, .ce, .w_ref, .w, .te_ref);

  function automatic real r(fix_t v); return real'(v) / (2.0 ** DF); endfunction
  task automatic chk(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc, a, b;
    acc = 0;
    w_ref = '0; w = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 20000; n++) begin
      if (n % 100 == 0) a = $signed($urandom_range(0, 300)) - 150.0;
      b = $signed($urandom_range(0, 300)) - 150.0;
      w_ref = to_fix(a); w = to_fix(b);
      #1;
      chk("te_ref", r(te_ref), (a - b) + 8.0 * acc, 0.02);
      ce = ($signed($urandom_range(0, 3)) != 0);
      @(posedge clk); #1;
      if (ce) acc += 1.001e-5 * (a - b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
