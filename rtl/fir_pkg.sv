// Coefficients of the FIR filters used as the user IP under test.
// The published design does not list its coefficient values, so this design
// uses a fixed, reproducible set: a triangular (Bartlett-like) window scaled to
// the largest positive coefficient value, with every fifth tap (index 2, 7,
// 12, ...) negated so that signed arithmetic is exercised:
//   k    = min(i, TAPS-1-i)
//   mag  = ((k + 1) * (2**(COEF_W-1) - 1)) / ((TAPS + 1) / 2)
//   c(i) = (i % 5 == 2) ? -mag : mag
// With COEF_W equal to the input width, sum(|c|) * 2**(DIN_W-1) stays below
// 2**(ACC_W-1) for both published configurations (64 taps / 10 bit / 26 bit
// and 32 taps / 7 bit / 19 bit), so the accumulator never overflows.
`timescale 1ns/1ps
package fir_pkg;

  function automatic int fir_coef(int i, int taps, int coef_w);
    int k;
    int mag;
    k   = (i < taps - 1 - i) ? i : taps - 1 - i;
    mag = ((k + 1) * ((1 << (coef_w - 1)) - 1)) / ((taps + 1) / 2);
    return (i % 5 == 2) ? -mag : mag;
  endfunction

endpackage
