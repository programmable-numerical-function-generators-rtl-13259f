// Shared constants of the quadratic numerical function generator (NFG).
//
// The NFG evaluates y = c2*(x-q)^2 + c1*(x-q) + c0 per segment, the segment
// being chosen by an LUT cascade. This package holds the default sizes used by
// every module, so that the units agree on the fixed-point formats:
//   x   : signed, N bits, XF fractional bits (two's complement, as in the
//         fixed-point definition the architecture is written for)
//   d   : x - q, signed, N+2 bits, XF+1 fractional bits (q is a segment
//         midpoint and may fall on half an input LSB)
//   acc : internal sum, AF = YF + GUARD fractional bits
//   y   : signed, YI integer bits (sign included) and YF fractional bits
// N = 24 is the larger of the two precisions the design was evaluated at;
// every other number here is this implementation's own choice.
package nfg_pkg;

  // Input precision and format.
  localparam int unsigned N_DEF      = 24;   // n-bit precision
  localparam int unsigned XF_DEF     = 22;   // fractional bits of x
  // Segment index encoder.
  localparam int unsigned K_DEF      = 9;    // index bits: table of 2^K words
  localparam int unsigned NCAS_DEF   = 6;    // number of LUTs in the cascade
  // Coefficient formats (mantissa * 2^l scaling).
  localparam int unsigned C2W_DEF    = 20;   // c2 mantissa bits
  localparam int unsigned C1W_DEF    = 26;   // c1 mantissa bits
  localparam int unsigned LW_DEF     = 7;    // signed scaling exponent bits
  // Output format.
  localparam int unsigned YI_DEF     = 3;    // integer bits of y, sign included
  localparam int unsigned GUARD_DEF  = 4;    // extra fractional bits inside
  localparam int unsigned ACCW_DEF   = 40;   // width of the internal sum

endpackage
