// tb_switching_table: exhaustive check of the switching table. The expected
// vector is generated from the voltage-vector rule, not from a copy of the
// table: with V1..V6 = 100,110,010,011,001,101 and sector N, flux up/torque
// up gives V(N+1), flux down/torque up V(N+2), flux up/torque down V(N-1),
// flux down/torque down V(N-2); torque hold gives the zero vector 111 when
// (N odd) equals the flux bit, 000 otherwise. Invalid inputs give 000.
module tb_switching_table;
  import dtc_pkg::*;
  int checks = 0, failures = 0;
  logic cflux;
  tq_err_e ctq;
  logic [2:0] sector;
  sw_state_t sw;
  localparam logic [2:0] V [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  switching_table dut (.cflux, .ctq, .sector, .sw);

  function automatic logic [2:0] vec(int k);  // V(k), k taken modulo 6, 1-based
    return V[((k - 1) % 6 + 6) % 6];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    for (int f = 0; f < 2; f++)
      for (int t = 0; t < 4; t++)
        for (int s = 0; s < 8; s++) begin
          cflux = f[0]; ctq = tq_err_e'(t[1:0]); sector = s[2:0];
          #1;
          if (s < 1 || s > 6 || t == 3) e = 3'b000;
          else if (t == 1) e = ((s % 2 == 1) == (f == 1)) ? 3'b111 : 3'b000;
          else if (t == 2) e = (f == 1) ? vec(s + 1) : vec(s + 2);
          else             e = (f == 1) ? vec(s - 1) : vec(s - 2);
          checks++;
          if (sw !== e) begin
            failures++;
            $display("FAIL flux %0d tq %0d sector %0d got %b exp %b", f, t, s, sw, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
