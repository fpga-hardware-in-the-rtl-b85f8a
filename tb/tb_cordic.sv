// tb_cordic: streams random vectors in all four quadrants through the
// pipelined CORDIC and checks, 11 enabled cycles later, magnitude*0.6073
// against sqrt(x^2+y^2) and the angle against atan2(y, x). A single vector
// followed by zeros checks the exact latency.
module tb_cordic;
  import dtc_pkg::*;
  localparam int LAT = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;
  cfix_t x, y, mag, ang;
  real qx[$], qy[$];
  always #5 clk = ~clk;

  cordic dut (.clk, .rst, .ce, .qsd(x), .qsq(y), .magnitude(mag), .angle_q(ang));

  function automatic real r(cfix_t v); return real'(v) / (2.0 ** CF); endfunction
  function automatic cfix_t c(real v); return cfix_t'(longint'(v * (2.0 ** CF))); endfunction
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
    real rx, ry, em, ea, pi;
    int seen;
    pi = 3.14159265358979;
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // latency: one pulse, then zeros
    ce = 1;
    x = c(1.0); y = c(1.0);
    @(posedge clk); #1;
    x = '0; y = '0;
    seen = 0;
    for (int k = 2; k <= LAT + 3; k++) begin
      @(posedge clk); #1;
      if (r(mag) > 0.5 && seen == 0) seen = k;
    end
    checks++;
    if (seen != LAT) begin
      failures++;
      $display("FAIL latency %0d expected %0d", seen, LAT);
    end
    // streaming with enable gaps
    for (int i = 0; i < LAT; i++) begin
      qx.push_back(0.0); qy.push_back(0.0);
    end
    for (int n = 0; n < 3000; n++) begin
      rx = ($signed($urandom_range(0, 4800)) - 2400) / 1000.0;
      ry = ($signed($urandom_range(0, 4800)) - 2400) / 1000.0;
      x = c(rx); y = c(ry);
      ce = ($signed($urandom_range(0, 4)) != 0);
      @(posedge clk); #1;
      if (ce) begin
        qx.push_back(r(x)); qy.push_back(r(y));
        void'(qx.pop_front()); void'(qy.pop_front());
        // front is the vector entered LAT enabled cycles ago
        em = $sqrt(qx[0] * qx[0] + qy[0] * qy[0]);
        chk("magnitude", r(mag) * 0.6073, em, 0.01);
        if (em > 0.05) begin
          ea = $atan2(qy[0], qx[0]);
          // +pi and -pi are the same angle
          if (ea - r(ang) > pi) ea -= 2.0 * pi;
          if (r(ang) - ea > pi) ea += 2.0 * pi;
          chk("angle", r(ang), ea, 0.01);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
