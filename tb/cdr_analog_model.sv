// cdr_analog_model: behavioural model of the analog half of the CDR, for
// simulation only (not synthesizable). It stands in for the wide-band
// VCO, the FLL charge pump with its loop-filter capacitor, the VC
// override switches fed by the bandgap references, and the coarse and
// fine frequency detectors.
//
// VCO: three linear bands, {D1, D0} = 00, 01, 10, spanning the band
// edges of the design (150-820 MHz, 0.8-1.24 GHz, 1.22-1.6 GHz):
//   band 1: 150 MHz at 0.40 V, 820 MHz at VC1max = 0.90 V
//   band 2: 800 MHz at 0.50 V, 1240 MHz at 0.90 V
//   band 3: 1220 MHz at VC3min = 0.54 V, 1500 MHz at 0.757 V
// The output clock ck is generated with its real period, so simulation
// time is real time (1 ps resolution).
// Charge pump: 500 uA into 1 nF. Each ck cycle in which UP_FD (DN_FD) is
// high while S1 is on adds (removes) 0.33 mV (a 0.667 ns pulse, one period
// at 1.5 GHz) scaled by fvco / 1.5 GHz, so that the relative frequency step
// per pulse cycle is the same in every band (the digital core produces
// whole-cycle pulses). While S2 is on (phase tracking, not modelled) VC
// is held.
// Frequency detectors: the beat phase ph advances by (fd - fvco) / fvco
// each VCO cycle, fd being half the data rate. The fine detector gives
// UP_F while ph mod 1 is in [0, 0.25) with the data faster, DN_F while it
// is in [0.5, 0.75) with the data slower: one pulse per beat, a quarter
// beat long but at most 8 VCO cycles; beyond 20 % error the beat is
// counted as 20 %, as sampling it once per VCO cycle would alias. The coarse detector gives the same
// pulses only when the error exceeds 2 %.
// All outputs change on the rising edge of ck.
module cdr_analog_model
  import cdr_pkg::*;
(
  input  int        rate_mbps,   // input data rate
  input  logic      up_fd,
  input  logic      dn_fd,
  input  logic      s1_on,
  input  logic      s2_on,
  input  vc_force_e vc_force,
  input  logic      d0,
  input  logic      d1,
  output logic      ck,
  output logic      up_c,
  output logic      dn_c,
  output logic      up_f1,
  output logic      dn_f
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam real VC3MIN = 0.54;
  localparam real VC1MAX = 0.90;
  localparam real DV     = 500.0e-6 * 0.667e-9 / 1.0e-9;  // volts per pulse cycle
  localparam real CFD_DZ = 0.02;
  localparam int  W_MAX  = 8;

  real vc = 0.6;
  real fvco = 1000.0;     // MHz
  real ph = 0.0;
  real err = 0.0;
  int  plen = 0;          // cycles the current detector pulse has lasted

  function automatic real band_f(real v, logic b0, logic b1);
    real f;
    if (b1)      f = 1220.0 + (v - VC3MIN) * (280.0 / (0.757 - VC3MIN));
    else if (b0) f = 800.0 + (v - 0.50) * (440.0 / 0.40);
    else         f = 150.0 + (v - 0.40) * (670.0 / (VC1MAX - 0.40));
    return (f < 10.0) ? 10.0 : f;
  endfunction

  initial begin
    ck = 1'b0;
    up_c = 1'b0; dn_c = 1'b0; up_f1 = 1'b0; dn_f = 1'b0;
    forever begin
      #(0.5e6 / fvco);
      ck = ~ck;
    end
  end

  always @(posedge ck) begin
    real frac;
    // loop filter / switches
    if (vc_force == VC_3MIN)      vc = VC3MIN;
    else if (vc_force == VC_1MAX) vc = VC1MAX;
    else if (s1_on && !s2_on)     vc = vc + DV * (fvco / 1500.0) * ((up_fd ? 1.0 : 0.0) - (dn_fd ? 1.0 : 0.0));
    if (vc < 0.30) vc = 0.30;
    if (vc > 1.00) vc = 1.00;
    fvco = band_f(vc, d0, d1);
    // detectors
    err = (real'(rate_mbps) / 2.0 - fvco) / fvco;
    // rotation rate capped at 0.2 turn per cycle so that a large error
    // cannot alias to a small one
    ph  = ph + ((err > 0.2) ? 0.2 : ((err < -0.2) ? -0.2 : err));
    ph  = ph - $floor(ph);
    frac = ph;
    if ((frac < 0.25) || ((frac >= 0.5) && (frac < 0.75))) plen++;
    else plen = 0;
    up_f1 <= (err > 0.0) && (frac < 0.25) && (plen <= W_MAX);
    dn_f  <= (err < 0.0) && (frac >= 0.5) && (frac < 0.75) && (plen <= W_MAX);
    up_c  <= (err > CFD_DZ) && (frac < 0.25) && (plen <= W_MAX);
    dn_c  <= (err < -CFD_DZ) && (frac >= 0.5) && (frac < 0.75) && (plen <= W_MAX);
  end
endmodule
