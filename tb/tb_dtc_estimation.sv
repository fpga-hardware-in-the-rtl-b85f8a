// tb_dtc_estimation: drives the estimation part with the six active voltage
// vectors in turn (so the flux travels a hexagon through all quadrants) and
// small random currents, and checks every sample against a real-valued
// model: Clarke transform, Euler flux integration, torque three samples
// late, magnitude and angle of the flux eleven samples late.
module tb_dtc_estimation;
  import dtc_pkg::*;
  localparam int CLAT = 11, TLAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;
  sw_state_t sw;
  fix_t isa, isb, qsd, qsq, fmag, fang, tq;
  real hd[$], hq[$], ht[$];
  localparam logic [2:0] V [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
  always #5 clk = ~clk;

  dtc_estimation dut (.clk, .rst, .ce, .sw, .isa, .isb, .qsd, .qsq,
                      .flux_mag(fmag), .flux_angle(fang), .torque(tq));

  function automatic real r(fix_t v); return real'(v) / (2.0 ** DF); endfunction
  task automatic chk(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, fd, fq, ra, rb, ial, ibe, val, vbe, ea, pi;
    pi = 3.14159265358979;
    k = $sqrt(2.0 / 3.0);
    fd = 0; fq = 0;
    sw = '0; isa = '0; isb = '0;
    for (int i = 0; i < TLAT; i++) ht.push_back(0.0);
    for (int i = 0; i <= CLAT; i++) begin hd.push_back(0.0); hq.push_back(0.0); end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    ce = 1;
    for (int n = 0; n < 6000; n++) begin
      sw = sw_state_t'(V[(n / 250) % 6]);
      ra = ($signed($urandom_range(0, 1000)) - 500) / 100.0;
      rb = ($signed($urandom_range(0, 1000)) - 500) / 100.0;
      isa = to_fix(ra); isb = to_fix(rb);
      ial = k * 1.5 * ra;
      ibe = k * ($sqrt(3.0) / 2.0) * (ra + 2.0 * rb);
      val = k * 514.6 * (sw.sa - 0.5 * sw.sb - 0.5 * sw.sc);
      vbe = k * 514.6 * ($sqrt(3.0) / 2.0) * (real'(sw.sb) - real'(sw.sc));
      // torque of this sample uses the flux before the update
      ht.push_back(2.0 * (fd * ibe - fq * ial));
      void'(ht.pop_front());
      @(posedge clk); #1;
      fd += 1.001e-5 * (val - 10.0 * ial);
      fq += 1.001e-5 * (vbe - 10.0 * ibe);
      hd.push_back(fd); hq.push_back(fq);
      void'(hd.pop_front()); void'(hq.pop_front());
      chk("qsd", r(qsd), fd, 5e-3);
      chk("qsq", r(qsq), fq, 5e-3);
      chk("torque", r(tq), ht[0], 0.1);
      // the CORDIC output is the flux of CLAT samples ago (front of history)
      chk("flux_mag", r(fmag), $sqrt(hd[0] * hd[0] + hq[0] * hq[0]), 0.01);
      if ($sqrt(hd[0] * hd[0] + hq[0] * hq[0]) > 0.1) begin
        ea = $atan2(hq[0], hd[0]);
        if (ea - r(fang) > pi) ea -= 2.0 * pi;
        if (r(fang) - ea > pi) ea += 2.0 * pi;
        chk("flux_angle", r(fang), ea, 0.01);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
