// cdr_fll_ctrl_top: digital control core of a wide-band referenceless
// half-rate CDR whose frequency-locked loop (FLL) uses a UP pulse selector
// to shorten frequency acquisition.
//
// The analog parts (coarse and fine frequency detectors, phase detector,
// charge pumps, loop filter, triple-band ring VCO, bandgap references)
// sit outside; this module takes their detector pulses and drives their
// control inputs:
//   * pulse_generator makes the power-on pulse EN; R = EN | LLD resets
//     everything else (synchronously).
//   * freq_band_selector forces VC to VC3min / VC1max and chooses the VCO
//     band bits D1, D0 from the coarse detector's UP_C / DN_C.
//   * up_pulse_selector widens the fine UP pulse while the frequency error
//     is large (bands 2 and 3) and stops widening when it gets small.
//   * fd_combiner merges coarse and fine pulses into UP_FD / DN_FD for the
//     FLL charge pump, with the STOP flip-flop.
//   * lock_detector raises LOCK at a small frequency error, and LLD when
//     the data rate changes afterwards.
//   * S1 (FLL charge pump to loop filter) is on after band selection and
//     before LOCK; S2 (phase-detector charge pump) is on after LOCK.
// The block partition and the connections follow the document's
// architecture. The synchronisers on the four detector inputs, and
// holding S1 off while the band selector forces VC, are this design's
// choices.
//
// Timing: everything runs on ck, the VCO clock. Detector pulses reach the
// logic two ck cycles after they arrive; UP_FD / DN_FD follow the
// synchronised pulses combinationally.
module cdr_fll_ctrl_top
  import cdr_pkg::*;
#(
  parameter int unsigned DIV_CK      = 8,
  parameter int unsigned TH_BAND2    = 20,
  parameter int unsigned TH_BAND3    = 8,
  parameter int unsigned EN_CYCLES   = 16,
  parameter int unsigned FBS_SETTLE  = 16,
  parameter int unsigned FBS_DN_WIN  = 4,
  parameter int unsigned FBS_TIMEOUT = 1024,
  parameter int unsigned LD_WIN      = 256
) (
  input  logic      ck,
  input  logic      por_n,
  input  logic      up_c_a,    // coarse FD, data faster (asynchronous)
  input  logic      dn_c_a,    // coarse FD, data slower
  input  logic      up_f1_a,   // fine FD UP
  input  logic      dn_f_a,    // fine FD DN
  output logic      up_fd,     // to the FLL charge pump
  output logic      dn_fd,
  output logic      s1_on,
  output logic      s2_on,
  output vc_force_e vc_force,
  output logic      d0,
  output logic      d1,
  output logic      lock,
  output logic      lld,
  output logic      r,
  output logic      stop,
  output logic      sl_up,
  output logic      fbs_done,
  output logic      up_f,      // UP pulse selector output (into the combiner)
  output logic      up_f2,     // widened UP pulse
  output logic      rs,        // UP pulse selector window restart
  output logic [4:0] n_up      // UP_F1 pulses counted in the current window
);
  logic       en;
  logic [3:0] det_s;
  logic       up_c, dn_c, up_f1, dn_f;

  pulse_generator #(.EN_CYCLES(EN_CYCLES)) u_pgen (
    .clk(ck), .por_n(por_n), .en(en)
  );

  assign r = en | lld;

  sync2 #(.WIDTH(4)) u_sync (
    .clk(ck), .r(r), .d({up_c_a, dn_c_a, up_f1_a, dn_f_a}), .q(det_s)
  );
  assign {up_c, dn_c, up_f1, dn_f} = det_s;

  freq_band_selector #(
    .SETTLE(FBS_SETTLE), .DN_WIN(FBS_DN_WIN), .TIMEOUT(FBS_TIMEOUT)
  ) u_fbs (
    .clk(ck), .r(r), .up_c(up_c), .dn_c(dn_c),
    .vc_force(vc_force), .d0(d0), .d1(d1), .done(fbs_done)
  );

  up_pulse_selector #(
    .DIV_CK(DIV_CK), .CNT_W(5), .WIN_BIT(4), .TH_BAND2(TH_BAND2), .TH_BAND3(TH_BAND3)
  ) u_ups (
    .clk(ck), .r(r), .stop(stop), .d0(d0), .d1(d1), .up_f1(up_f1),
    .up_f(up_f), .up_f2(up_f2), .sl_up(sl_up), .rs(rs), .n_up(n_up)
  );

  fd_combiner u_comb (
    .clk(ck), .r(r), .up_c(up_c), .dn_c(dn_c), .up_f(up_f), .dn_f(dn_f),
    .up_fd(up_fd), .dn_fd(dn_fd), .stop(stop)
  );

  lock_detector #(.LD_WIN(LD_WIN)) u_ld (
    .clk(ck), .r(r), .en(fbs_done), .up_fd(up_fd), .dn_fd(dn_fd),
    .up_c(up_c), .dn_c(dn_c), .lock(lock), .lld(lld)
  );

  assign s1_on = fbs_done & ~lock;
  assign s2_on = lock;

endmodule
