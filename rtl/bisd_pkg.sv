// Shared types of the built-in self-diagnosis (BISD) design.
//
// tpg_step_e names the four steps of the low-power test pattern generator
// (LP-TPG): one step per clock, T(i), T(k1), T(k2), T(k3), then T(i+1).
// bisd_state_e names the states of the BIST controller that sequences scan
// shifting, capture and the comparison of each intermediate signature.
package bisd_pkg;

  typedef enum logic [1:0] {
    STEP1 = 2'd0,  // en1en2=10 sel1sel2=11 : T(i), first half shifts
    STEP2 = 2'd1,  // en1en2=00 sel1sel2=10 : T(k1), second half injected
    STEP3 = 2'd2,  // en1en2=01 sel1sel2=11 : T(k2), second half shifts
    STEP4 = 2'd3   // en1en2=00 sel1sel2=01 : T(k3), first half injected
  } tpg_step_e;

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,  // waiting for start
    S_SHIFT   = 3'd1,  // scan chains shift: load next pattern, unload last response
    S_CHECK   = 3'd2,  // compare intermediate signature, log on mismatch, clear MISR
    S_CAPTURE = 3'd3,  // scan cells capture the circuit response
    S_DONE    = 3'd4   // session finished, fail memory ready for download
  } bisd_state_e;

endpackage
