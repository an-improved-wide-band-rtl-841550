// tb_cdr_fll_ctrl_top: end-to-end test of the CDR control core at its
// default parameters, closed around the behavioural analog model
// (cdr_analog_model: triple-band VCO, FLL charge pump and capacitor,
// coarse and fine frequency detectors).
//
// For each input data rate the core is powered on and must: pick the
// expected VCO band, acquire frequency and raise LOCK with the VCO within
// 0.5 % of half the data rate. Rates: 3.0 and 3.2 Gb/s (band 3), 2.0 Gb/s
// (band 2), 1.0 and 0.3 Gb/s (band 1). After the 3.0 Gb/s lock the data
// rate is switched to 1.0 Gb/s without a power-on: the loss-of-lock
// detector must fire (LLD) and the core must reacquire in band 1.
// The acquisition time at 3 Gb/s (from the end of reset to LOCK) is
// printed and must stay under 2 us, the control voltage is printed at
// 100, 300, 500, 700 and 900 ns and must rise; the widening phase of the UP pulse
// selector must end with SL_UP before LOCK.
// Mechanisms counted, each must occur: each band chosen, STOP, cycles
// with the widened UP pulse selected, window restarts (RS), SL_UP, LOCK,
// S1-to-S2 hand-over, LLD.
module tb_cdr_fll_ctrl_top;
  import cdr_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic ck, por_n;
  logic up_c_a, dn_c_a, up_f1_a, dn_f_a;
  logic up_fd, dn_fd, s1_on, s2_on, d0, d1, lock, lld, r, stop, sl_up, fbs_done;
  logic up_f, up_f2, rs;
  logic [4:0] n_up;
  vc_force_e vc_force;
  int rate_mbps;

  int checks = 0, failures = 0;
  int n_band[3];
  int n_stop = 0, n_widen = 0, n_rs = 0, n_slup = 0, n_lock = 0, n_handover = 0, n_lld = 0;
  logic stop_q = 0, sl_q = 0, lock_q = 0, done_q = 0;

  cdr_fll_ctrl_top dut (
    .ck(ck), .por_n(por_n), .up_c_a(up_c_a), .dn_c_a(dn_c_a), .up_f1_a(up_f1_a), .dn_f_a(dn_f_a),
    .up_fd(up_fd), .dn_fd(dn_fd), .s1_on(s1_on), .s2_on(s2_on), .vc_force(vc_force),
    .d0(d0), .d1(d1), .lock(lock), .lld(lld), .r(r), .stop(stop), .sl_up(sl_up),
    .fbs_done(fbs_done), .up_f(up_f), .up_f2(up_f2), .rs(rs), .n_up(n_up)
  );

  cdr_analog_model ana (
    .rate_mbps(rate_mbps), .up_fd(up_fd), .dn_fd(dn_fd), .s1_on(s1_on), .s2_on(s2_on),
    .vc_force(vc_force), .d0(d0), .d1(d1), .ck(ck),
    .up_c(up_c_a), .dn_c(dn_c_a), .up_f1(up_f1_a), .dn_f(dn_f_a)
  );

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t ps", what, $time);
    end
  endtask

  // mechanism counters
  always @(posedge ck) begin
    if (por_n) begin
      if (stop && !stop_q) n_stop++;
      if (stop && (d0 || d1) && !sl_up && s1_on) n_widen++;
      if (rs && !r) n_rs++;
      if (sl_up && !sl_q) n_slup++;
      if (lock && !lock_q) begin
        n_lock++;
        if (s2_on && !s1_on) n_handover++;
      end
      if (lld) n_lld++;
      if (fbs_done && !done_q) n_band[{d1, d0} == BAND1 ? 0 : ({d1, d0} == BAND2 ? 1 : 2)]++;
    end
    stop_q <= stop; sl_q <= sl_up; lock_q <= lock; done_q <= fbs_done;
  end

  // results of the last acquisition
  bit  lk_ok;
  real lk_t_ns;

  // Wait for LOCK; lk_t_ns is the time from the end of reset in ns.
  task automatic wait_lock();
    realtime t0;
    lk_ok = 0;
    lk_t_ns = -1.0;
    while (r) @(posedge ck);
    t0 = $realtime;
    fork
      begin : wl
        while (!lock) @(posedge ck);
        lk_ok = 1;
      end
      begin
        #(200us);
      end
    join_any
    disable fork;
    lk_t_ns = ($realtime - t0) / 1000.0;
  endtask

  task automatic acquire(int rate, band_e band, bit power_on);
    real ferr;
    rate_mbps = rate;
    if (power_on) begin
      por_n = 0;
      #(20ns);
      por_n = 1;
    end else begin
      // wait for the loss-of-lock reset
      fork
        begin : wr
          while (!r) @(posedge ck);
        end
        #(50us);
      join_any
      disable fork;
      check($sformatf("%0d Mb/s: loss of lock detected", rate), r);
    end
    wait_lock();
    ferr = ana.err;
    $display("%0d Mb/s: band %0d, lock %0b after %0.1f ns, VCO %0.2f MHz, error %0.3f %%, VC %0.3f V",
             rate, {d1, d0} == BAND1 ? 1 : ({d1, d0} == BAND2 ? 2 : 3), lk_ok, lk_t_ns, ana.fvco,
             ferr * 100.0, ana.vc);
    check($sformatf("%0d Mb/s: locked", rate), lk_ok);
    check($sformatf("%0d Mb/s: band", rate), {d1, d0} == band);
    check($sformatf("%0d Mb/s: error below 0.5 %%", rate), ferr < 0.005 && ferr > -0.005);
    check($sformatf("%0d Mb/s: S2 on, S1 off after lock", rate), s2_on && !s1_on);
    // lock must hold while the rate is unchanged
    repeat (3000) @(posedge ck);
    check($sformatf("%0d Mb/s: lock held", rate), lock === 1'b1);
  endtask

  initial begin
    real t3;
    int slup_before;
    por_n = 0;
    rate_mbps = 3000;

    slup_before = n_slup;
    // VC ramp at 3 Gb/s, sampled 100..900 ns after band selection
    fork
      begin
        real vprev;
        wait (por_n);
        @(posedge ck);
        while (r || !fbs_done) @(posedge ck);
        vprev = ana.vc;
        for (int k = 0; k < 5; k++) begin
          #((k == 0) ? 100ns : 200ns);
          $display("3 Gb/s: VC %0d ns after band selection: %0.0f mV", 100 + 200 * k, ana.vc * 1000.0);
          check("3 Gb/s: VC rises during acquisition", ana.vc > vprev);
          vprev = ana.vc;
        end
      end
    join_none
    acquire(3000, BAND3, 1);
    t3 = lk_t_ns;
    check("3 Gb/s: SL_UP ended the widening before lock", n_slup > slup_before && sl_up);
    check("3 Gb/s: acquisition under 2 us", t3 > 0.0 && t3 < 2000.0);
    // rate change without power-on: LoLD resets and the loop reacquires
    acquire(1000, BAND1, 0);
    acquire(3200, BAND3, 1);
    acquire(2000, BAND2, 1);
    acquire(1000, BAND1, 1);
    acquire(300, BAND1, 1);

    $display("mechanisms: band1=%0d band2=%0d band3=%0d stop=%0d widen_cycles=%0d rs=%0d sl_up=%0d lock=%0d handover=%0d lld=%0d",
             n_band[0], n_band[1], n_band[2], n_stop, n_widen, n_rs, n_slup, n_lock, n_handover, n_lld);
    check("band 1 chosen", n_band[0] > 0);
    check("band 2 chosen", n_band[1] > 0);
    check("band 3 chosen", n_band[2] > 0);
    check("STOP raised", n_stop > 0);
    check("UP pulse widened", n_widen > 0);
    check("window restarted by RS", n_rs > 0);
    check("SL_UP raised", n_slup > 0);
    check("LOCK raised", n_lock > 0);
    check("S1 to S2 hand-over", n_handover > 0);
    check("LLD fired", n_lld > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
