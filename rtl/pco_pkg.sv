// Shared types for the pulse-coupled phase oscillator (PCO) network.
//
// The update circuit tells the phase counter, with a 2-bit code, how to
// treat the current clock: count normally, advance (positive update) or
// retard (negative update). The 2-bit width follows the oscillator diagram;
// the encoding below is this design's own choice.
package pco_pkg;

  typedef enum logic [1:0] {
    UPD_NONE = 2'b00,  // phase += OMEGA
    UPD_POS  = 2'b01,  // phase += OMEGA + K_STEP (fire earlier)
    UPD_NEG  = 2'b10   // phase += OMEGA - K_STEP (fire later)
  } update_e;

endpackage
