// cdr_pkg: types shared by the digital control core of the wide-band
// referenceless CDR.
//
// The VCO has three bands chosen by two control bits (D1, D0):
//   00 = band 1 (150-820 MHz), 01 = band 2 (0.8-1.24 GHz),
//   10 = band 3 (1.22-1.6 GHz), 11 = not used.
// During band selection the frequency band selector overrides the VCO
// control voltage with one of two bandgap-derived references; vc_force_e
// tells the analog side which one (or none) to apply.
package cdr_pkg;

  typedef enum logic [1:0] {
    VC_LOOP  = 2'd0,  // loop filter drives VC (normal operation)
    VC_3MIN  = 2'd1,  // VC forced to VC3min (bottom of band 3)
    VC_1MAX  = 2'd2   // VC forced to VC1max (top of band 1)
  } vc_force_e;

  // Band code as the pair {D1, D0}.
  typedef enum logic [1:0] {
    BAND1 = 2'b00,
    BAND2 = 2'b01,
    BAND3 = 2'b10
  } band_e;

  // States of the frequency band selector.
  typedef enum logic [2:0] {
    FBS_CHECK3,    // VC = VC3min, D1 = 1: look for UP_C
    FBS_CHECK1,    // VC = VC1max, D1 = 0: look for UP_C
    FBS_DONE       // band chosen, loop released
  } fbs_state_e;

endpackage
