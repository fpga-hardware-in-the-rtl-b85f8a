// tb_dtc_workload_speed_profile: the 2 s speed/load profile of the
// design's hardware-in-the-loop validation, run closed loop against the
// inverter/induction-machine model im_plant with the controller at its
// default parameters. Every clock is one 1.001e-5 s sample (199,800 in all).
// Profile (levels read from the validation plots): flux reference 1.2 Wb;
// speed reference 130 rad/s from rest; 8 N.m load from 0.5 s; reference
// 100 rad/s from 1.0 s and 70 rad/s from 1.4 s.
// Checks: the estimated flux follows the machine's flux within 0.03 Wb;
// the flux magnitude stays within 1.0..1.5 Wb once magnetised (it dips
// briefly when the reference steps down); the speed
// stays below 160 rad/s (the unlimited PI integrator overshoots during the
// voltage-limited start); the speed is within 4 rad/s of 130 before the
// first step and within 1 rad/s of 70 at the end, where the machine torque
// carries the 8 N.m load; all six sectors, both flux decisions and the
// torque raise/lower decisions occur.
module tb_dtc_workload_speed_profile;
  import dtc_pkg::*;
  localparam int NSAMP = 199800;  // 2 s
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;
  fix_t isa, isb, w, w_ref, flux_ref;
  sw_state_t sw;
  fix_t qsd, qsq, fmag, fang, tq, tqr;
  logic [2:0] sector;
  logic cflux;
  tq_err_e ctq;
  real ia, ib, wm, te, psa, psb, tl;
  int n_sector [8], n_cflux [2], n_ctq [4], n_zero000, n_zero111, n_active;
  always #5 clk = ~clk;

  dtc_top dut (
    .clk, .rst, .ce, .isa, .isb, .w, .w_ref, .flux_ref, .sw,
    .qsd, .qsq, .flux_mag(fmag), .flux_angle(fang), .torque(tq), .torque_ref(tqr),
    .sector, .cflux, .ctq
  );

  im_plant plant (.clk, .step(ce && !rst), .s_abc(sw), .tl, .ia, .ib, .wm, .te, .psa, .psb);

  function automatic real r(fix_t v); return real'(v) / (2.0 ** DF); endfunction
  task automatic chk(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  // measured quantities go to the controller as datapath words
  always_comb begin
    isa = to_fix(ia);
    isb = to_fix(ib);
    w   = to_fix(wm);
  end

  initial begin
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wr, fmax_err;
    for (int i = 0; i < 8; i++) n_sector[i] = 0;
    n_cflux = '{0, 0}; n_ctq = '{0, 0, 0, 0};
    n_zero000 = 0; n_zero111 = 0; n_active = 0;
    tl = 0.0; wr = 130.0; fmax_err = 0.0;
    flux_ref = to_fix(1.2);
    w_ref = to_fix(wr);
    repeat (3) @(posedge clk);
    #1 rst = 0; ce = 1;
    for (int n = 0; n < NSAMP; n++) begin
      if (n == 50000) tl = 8.0;
      if (n == 100000) begin wr = 100.0; w_ref = to_fix(wr); end
      if (n == 140000) begin wr = 70.0; w_ref = to_fix(wr); end
      @(posedge clk); #1;
      n_sector[sector]++;
      n_cflux[cflux]++;
      n_ctq[ctq]++;
      if (sw == 3'b000) n_zero000++;
      else if (sw == 3'b111) n_zero111++;
      else n_active++;
      // estimator against the machine, every 100 samples
      if (n % 100 == 99) begin
        chk("flux alpha", r(qsd), psa, 0.03);
        chk("flux beta",  r(qsq), psb, 0.03);
      end
      // flux regulation once magnetised
      if (n > 3000 && n % 100 == 0) chk("flux magnitude", $sqrt(psa * psa + psb * psb), 1.25, 0.25);
      if (n % 100 == 0) chk("speed overshoot", (wm > 160.0) ? 1.0 : 0.0, 0.0, 0.0);
      if (n == 94999) chk("speed before the first step", wm, 130.0, 4.0);
      if (n == NSAMP - 1) begin
        chk("final speed", wm, 70.0, 1.0);
        chk("machine torque under load", te, 8.0, 1.5);
      end
      if (n % 10000 == 0)
        $display("t=%0.3f s  w=%0.2f  Te=%0.2f  Te_ref=%0.2f  |flux|=%0.3f  sector=%0d",
                 n * 1.001e-5, wm, te, r(tqr), r(fmag), sector);
    end
    for (int s = 1; s <= 6; s++) chk($sformatf("sector %0d visits", s), n_sector[s] > 0, 1.0, 0.0);
    chk("flux increase", n_cflux[1] > 0, 1.0, 0.0);
    chk("flux decrease", n_cflux[0] > 0, 1.0, 0.0);
    chk("torque increase", n_ctq[TQ_INC] > 0, 1.0, 0.0);
    chk("torque decrease", n_ctq[TQ_DEC] > 0, 1.0, 0.0);
    chk("active vectors",  n_active > 0, 1.0, 0.0);
    $display("sectors %0d %0d %0d %0d %0d %0d  flux up/down %0d/%0d  torque inc/hold/dec %0d/%0d/%0d  zero 000/111 %0d/%0d active %0d",
             n_sector[1], n_sector[2], n_sector[3], n_sector[4], n_sector[5], n_sector[6],
             n_cflux[1], n_cflux[0], n_ctq[TQ_INC], n_ctq[TQ_HOLD], n_ctq[TQ_DEC],
             n_zero000, n_zero111, n_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
