// Shared sizes of the UWB pulse-matched-filter baseband.
//
// The receive chain looks at a window of N_TAPS = 79 four-bit samples and
// correlates it with a 64-sample template of five-bit coefficients at
// N_OFF = 16 consecutive sample offsets (79 - 64 + 1). Each dot product fits
// in PMF_W = 15 bits. These numbers follow the filter specification; the
// number of pulses accumulated per symbol (N_ACC) and the PN generator
// width are this design's own choices.
package uwb_pkg;

  parameter int unsigned N_TAPS = 79;   // samples in the filter window
  parameter int unsigned N_COEF = 64;   // template (coefficient) length
  parameter int unsigned N_OFF  = N_TAPS - N_COEF + 1;  // offsets = 16
  parameter int unsigned X_W    = 4;    // ADC sample width, signed
  parameter int unsigned C_W    = 5;    // coefficient width, signed
  parameter int unsigned PMF_W  = 15;   // PMF output width, signed
  parameter int unsigned N_ACC  = 16;   // pulses accumulated per symbol
  parameter int unsigned PN_W   = 7;    // PN LFSR length
  parameter int unsigned ADDR_W = $clog2(N_OFF + 1);  // holds 1..16

  // Feedback mask of the PN LFSR (right-shifting Fibonacci form, output is
  // bit 0, new bit 6 = parity of state & mask). Period 127.
  parameter logic [PN_W-1:0] PN_MASK = 7'b000_0011;

endpackage
