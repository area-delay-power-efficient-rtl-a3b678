// lms_pkg: default sizes shared by the modified delayed-LMS (DLMS) adaptive filter.
//
// All word lengths are two's complement. Input samples x and the multiplier
// digits taken from them are L bits wide (LMS_L, must be even); weights,
// desired response d, filter output y and error e are W bits wide (LMS_W).
// Samples are read as fractions with L-1 fraction bits, weights, y, d and e
// as fractions with W-1 fraction bits. The step size mu is a power of two,
// 2^-LMS_MU_SHIFT, so that multiplying by it is a right shift.
//
// The filter structure (tap count N, digit width L, weight width W, the
// delays n1 and n2) follows the document; none of the numeric values below
// is printed there, so all of them are this design's own choice.
package lms_pkg;
  localparam int unsigned LMS_N        = 16; // filter taps
  localparam int unsigned LMS_L        = 8;  // input-sample word length
  localparam int unsigned LMS_W        = 16; // weight / error word length
  localparam int unsigned LMS_N2       = 1;  // weight delay into the filter (n2)
  localparam int unsigned LMS_MU_SHIFT = 4;  // mu = 2^-LMS_MU_SHIFT
  // Latency of the error-computation block (n1): one pipeline register
  // between the adder trees and the shift-add tree, one error register.
  localparam int unsigned LMS_N1       = 2;
endpackage
