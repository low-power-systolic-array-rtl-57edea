// filter_pkg: sizes and coefficient sets shared by the systolic filter.
//
// Data samples and coefficients are two's-complement numbers of 8 bits, the
// operand width of the compressor multiplier.  Coefficients use a fixed
// binary point with COEF_FRAC = 5 fractional bits (range -4 .. +3.97, step
// 1/32), which is the smallest format holding every coefficient of the two
// difference equations exactly: 1, -2, 2, -1 and -1/32.  The 8-bit width is
// the multiplier width of the design; the binary point is this design's own
// choice.
//
// The low-pass section realises
//     y(n) = 2 y(n-1) - y(n-2) + x(n) - 2 x(n-6) + x(n-12)
// and the high-pass section
//     y(n) = x(n-16) - (1/32) [ y(n-1) + x(n) - x(n-32) ]
// Both are written as feed-forward taps a_i (i = 0 .. CELLS-1) and feedback
// taps b_i (i = 1 .. CELLS); the systolic array itself adds one sample of
// input delay in front of every section.
package filter_pkg;

  parameter int unsigned DATA_W    = 8;   // sample width (multiplier operand)
  parameter int unsigned COEF_W    = 8;   // coefficient width (multiplier operand)
  parameter int unsigned COEF_FRAC = 5;   // fractional bits of a coefficient

  parameter int unsigned LP_CELLS  = 13;  // a_0 .. a_12 of the low-pass equation
  parameter int unsigned HP_CELLS  = 33;  // a_0 .. a_32 of the high-pass equation

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Coefficient value v scaled to the fixed-point format: v * 2**COEF_FRAC.
  localparam coef_t ONE      = coef_t'(1 << COEF_FRAC);
  localparam coef_t MINUS1   = coef_t'(-(1 << COEF_FRAC));
  localparam coef_t TWO      = coef_t'(2 << COEF_FRAC);
  localparam coef_t MINUS2   = coef_t'(-(2 << COEF_FRAC));
  localparam coef_t THIRTY2ND       = coef_t'(1);
  localparam coef_t MINUS_THIRTY2ND = coef_t'(-1);

  // Feed-forward tap i of the low-pass equation.
  function automatic coef_t lp_a(int unsigned i);
    case (i)
      0:       return ONE;
      6:       return MINUS2;
      12:      return ONE;
      default: return '0;
    endcase
  endfunction

  // Feedback tap i (i >= 1) of the low-pass equation.
  function automatic coef_t lp_b(int unsigned i);
    case (i)
      1:       return TWO;
      2:       return MINUS1;
      default: return '0;
    endcase
  endfunction

  // Feed-forward tap i of the high-pass equation.
  function automatic coef_t hp_a(int unsigned i);
    case (i)
      0:       return MINUS_THIRTY2ND;
      16:      return ONE;
      32:      return THIRTY2ND;
      default: return '0;
    endcase
  endfunction

  // Feedback tap i (i >= 1) of the high-pass equation.
  function automatic coef_t hp_b(int unsigned i);
    return (i == 1) ? MINUS_THIRTY2ND : '0;
  endfunction

endpackage
