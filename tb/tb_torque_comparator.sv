// tb_torque_comparator: checks the three-level torque decision with the
// default band (0) and with a band of 0.5 N.m, over random and equal
// inputs; all three codes must occur in both.
module tb_torque_comparator;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  fix_t tr, te;
  tq_err_e c0, c1;
  int seen0 [3], seen1 [3];

  torque_comparator dut0 (.torque_ref(tr), .torque_est(te), .ctq(c0));
  torque_comparator #(.BAND(to_fix(0.5))) dut1 (.torque_ref(tr), .torque_est(te), .ctq(c1));

  function automatic int expect_code(int e_milli, int band_milli);
    if (e_milli > band_milli) return 2;
    if (e_milli < -band_milli) return 0;
    return 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    for (int k = 0; k < 3; k++) begin seen0[k] = 0; seen1[k] = 0; end
    for (int n = 0; n < 3000; n++) begin
      a = $signed($urandom_range(0, 4000)) - 2000;
      b = (n % 7 == 0) ? a : a + $signed($urandom_range(0, 2000)) - 1000;
      tr = to_fix(a / 1000.0);
      te = to_fix(b / 1000.0);
      #1;
      checks += 2;
      seen0[int'(c0)]++;
      seen1[int'(c1)]++;
      if (int'(c0) != expect_code(a - b, 0)) begin
        failures++;
        $display("FAIL band0 e=%0d code %0d", a - b, c0);
      end
      if (int'(c1) != expect_code(a - b, 500)) begin
        failures++;
        $display("FAIL band0.5 e=%0d code %0d", a - b, c1);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (seen0[k] == 0 || seen1[k] == 0) begin
        failures++;
        $display("FAIL code %0d never produced", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
