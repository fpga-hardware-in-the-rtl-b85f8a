// tb_sector_select: sweeps the flux angle over (-pi, pi) and compares the
// sector with floor(wrap(angle)*6/(2*pi)) + 1, where wrap adds 2*pi to
// negative angles; points within 5e-3 rad of a boundary are skipped. All
// six sectors must be seen. (The design's 2*pi constant 6.28125 and gain
// 0.9549 move the boundaries by up to 2.1 mrad, inside the skipped zone.)
module tb_sector_select;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  fix_t angle;
  logic [2:0] sector;
  int hits [7];

  sector_select dut (.angle, .sector);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, w, f, pi;
    int e;
    pi = 3.14159265358979;
    for (int n = 0; n < 7; n++) hits[n] = 0;
    for (int n = -3140; n <= 3140; n += 3) begin
      a = n / 1000.0;
      w = (a < 0) ? a + 2.0 * pi : a;
      f = w * 6.0 / (2.0 * pi);
      e = int'($floor(f)) + 1;
      angle = to_fix(a);
      #1;
      if ((f - $floor(f)) * 2.0 * pi / 6.0 > 5e-3 && ($ceil(f) - f) * 2.0 * pi / 6.0 > 5e-3) begin
        checks++;
        hits[sector]++;
        if (int'(sector) != e) begin
          failures++;
          $display("FAIL angle %f sector %0d expected %0d", a, sector, e);
        end
      end
    end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (hits[s] == 0) begin
        failures++;
        $display("FAIL sector %0d never seen", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
