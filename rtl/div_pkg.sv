// div_pkg -- constants and helpers shared by the combined BID/binary divider.
//
// Widths of the 64-bit formats (binary64: 53-bit precision, 11-bit exponent,
// bias 1023; decimal64: 16 digits, 10-bit exponent, bias 398) and of the
// datapath. The residual is a two's complement fixed-point number with
// RES_FRAC fraction bits; the normalized divisor lies in [1,2). Powers of ten
// are produced by a constant function so that no table file is needed.
package div_pkg;
  localparam int MW       = 54;   // significand input width (10^16 < 2^54)
  localparam int QW       = 54;   // quotient register width
  localparam int RES_FRAC = 60;   // fraction bits of x, d and the residual
  localparam int RES_W    = 66;   // residual width: 6 integer + 60 fraction
  localparam int OPW      = RES_FRAC + 1;  // x and d: 1 integer + 60 fraction
  localparam int YW       = 14;   // residual estimate: 6 integer + 8 fraction
  localparam int YFRAC    = 8;
  localparam int BIAS_B   = 1023;
  localparam int BIAS_D   = 398;
  localparam int DEC_DIGITS = 16;
  localparam int NDEC     = 17;   // radix-10 recurrence iterations
  localparam int NBIN     = 14;   // radix-16 recurrence iterations
  localparam int NNORM    = 4;    // normalization cycles

  typedef logic [4:0] sdigit_t;   // signed quotient digit -10..10

  // 10^i as a 64-bit unsigned value (valid for i <= 19).
  function automatic logic [63:0] pow10(input int unsigned i);
    logic [63:0] v;
    v = 64'd1;
    for (int unsigned k = 0; k < i; k++) v = v * 64'd10;
    return v;
  endfunction
endpackage
