// Function generator: three-level phase sensitivity function.
//
// Approximates Z(phi) = -sin(phi) with the values +1, 0 and -1 and reports
// them as two flags: zp (Z > 0, an input spike advances the phase) and
// zn (Z < 0, an input spike retards it). From the counter decode:
//   first half of the period  (c_msb = 0): -sin < 0  -> zn
//   second half               (c_msb = 1): -sin > 0  -> zp
// Both are suppressed near the zero crossings of sin, that is while c_mid0
// is low (start of a half period) or c_mid1 is high (end of a half period),
// which gives a dead band where two oscillators that fire almost together
// leave each other alone. sign = 1 swaps the two flags (Z = +sin).
// Purely combinational. Using -sin and the signals cMSB/cMid0/cMid1/sign
// follows the source design; the exact decode is this design's choice.
module func_gen (
  input  logic sign,
  input  logic c_msb,
  input  logic c_mid0,
  input  logic c_mid1,
  output logic zp,
  output logic zn
);

  logic active;   // |Z| = 1 region
  logic z_pos;    // sign of -sin(phi)

  assign active = c_mid0 & ~c_mid1;
  assign z_pos  = c_msb ^ sign;

  assign zp = active &  z_pos;
  assign zn = active & ~z_pos;

endmodule
