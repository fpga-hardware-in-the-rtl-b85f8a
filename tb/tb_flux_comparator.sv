// tb_flux_comparator: random reference/estimate pairs, including equal
// values; the output must be 1 exactly when the reference is larger.
module tb_flux_comparator;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  fix_t fr, fe;
  logic cflux;

  flux_comparator dut (.flux_ref(fr), .flux_est(fe), .cflux);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    for (int n = 0; n < 2000; n++) begin
      a = $signed($urandom_range(0, 3000));
      b = (n % 5 == 0) ? a : $signed($urandom_range(0, 3000));
      fr = to_fix(a / 1000.0);
      fe = to_fix(b / 1000.0);
      #1;
      checks++;
      if (cflux !== (a > b)) begin
        failures++;
        $display("FAIL ref %0d est %0d out %b", a, b, cflux);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
