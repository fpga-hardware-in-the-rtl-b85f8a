// tb_dtc_switching: random angle, flux and torque pairs into the switching
// part; the expected inverter state is built independently from the
// comparisons, the sector 1 + floor(angle*6/(2*pi)) (angles within 5 mrad
// of a boundary skipped) and the voltage-vector rule of the Takahashi
// table (see tb_switching_table).
module tb_dtc_switching;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  fix_t ang, fr, fm, trf, tq;
  sw_state_t sw;
  logic [2:0] sector;
  logic cflux;
  tq_err_e ctq;
  localparam logic [2:0] V [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  dtc_switching dut (.flux_angle(ang), .flux_ref(fr), .flux_mag(fm), .torque_ref(trf),
                     .torque(tq), .sw, .sector, .cflux, .ctq);

  function automatic logic [2:0] vec(int k);
    return V[((k - 1) % 6 + 6) % 6];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, w, f, pi;
    int s, fb, t, am, bm, cm, dm;
    logic [2:0] e;
    pi = 3.14159265358979;
    for (int n = 0; n < 4000; n++) begin
      a = ($signed($urandom_range(0, 6280)) - 3140) / 1000.0;
      am = $urandom_range(0, 1500); bm = $urandom_range(0, 1500);
      cm = $signed($urandom_range(0, 3000)) - 1500;
      dm = (n % 6 == 0) ? cm : $signed($urandom_range(0, 3000)) - 1500;
      ang = to_fix(a); fr = to_fix(am / 1000.0); fm = to_fix(bm / 1000.0);
      trf = to_fix(cm / 100.0); tq = to_fix(dm / 100.0);
      #1;
      w = (a < 0) ? a + 2.0 * pi : a;
      f = w * 6.0 / (2.0 * pi);
      if ((f - $floor(f)) * pi / 3.0 < 5e-3 || ($ceil(f) - f) * pi / 3.0 < 5e-3) continue;
      s = int'($floor(f)) + 1;
      fb = (am > bm) ? 1 : 0;
      t = (cm > dm) ? 2 : (cm < dm) ? 0 : 1;
      if (t == 1)      e = ((s % 2 == 1) == (fb == 1)) ? 3'b111 : 3'b000;
      else if (t == 2) e = (fb == 1) ? vec(s + 1) : vec(s + 2);
      else             e = (fb == 1) ? vec(s - 1) : vec(s - 2);
      checks++;
      if (sw !== e || int'(sector) != s || int'(cflux) != fb || int'(ctq) != t) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%f sector %0d/%0d cflux %0d/%0d ctq %0d/%0d sw %b/%b",
                   a, sector, s, cflux, fb, ctq, t, sw, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
