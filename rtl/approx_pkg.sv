// approx_pkg: shared types and padding formulas for the truncated arithmetic
// circuits with output error compensation.
//
// A truncated circuit drops the least significant cells of an array and puts
// a constant "padding" in place of what those cells would have produced. The
// padding equals the mean value of the dropped part under uniformly
// distributed operands, so the average signed error of the result is pulled
// back towards zero. The functions below give the padding for each circuit:
//   adder                : k ones, 2^k - 1 (mean of the truncated k-bit sum
//                          of two k-bit fields is 2^k - 1)
//   multiplier, vertical : floor(((k-1)*2^k + 1) / 4)
//   multiplier, horizont.: floor((2^(n+1)-1)*(2^k-1)/4 + 2^n); the 2^n term
//                          is the Baugh-Wooley correction constant, which is
//                          dropped together with the first row
//   divider              : 2^(k-1) on the k truncated quotient bits
// The formulas follow the analysis of the scheme; rounding down to an integer
// is the choice that reproduces its published padding patterns.
package approx_pkg;

  // Which partial products a truncated multiplier drops.
  typedef enum logic [0:0] {
    TRUNC_VERTICAL   = 1'b0,  // the k least significant columns
    TRUNC_HORIZONTAL = 1'b1   // the k least significant rows (multiplier bits)
  } trunc_mode_e;

  // Padding of a k-column vertically truncated multiplier.
  function automatic longint unsigned mul_vert_padding(input int k);
    longint unsigned twok;
    if (k <= 0) return 0;
    twok = longint'(1) << k;
    return ((longint'(k) - 1) * twok + 1) / 4;
  endfunction

  // Padding of an n-bit multiplier with its k lowest rows removed. It
  // replaces the k rows and the 2^n Baugh-Wooley constant.
  function automatic longint unsigned mul_horiz_padding(input int n, input int k);
    longint unsigned rowsum;
    if (k <= 0) return 0;
    rowsum = ((longint'(1) << (n + 1)) - 1) * ((longint'(1) << k) - 1);
    return (rowsum + (longint'(4) << n)) / 4;
  endfunction

  // Padding of the k truncated quotient bits of the divider.
  function automatic longint unsigned div_padding(input int k);
    if (k <= 0) return 0;
    return longint'(1) << (k - 1);
  endfunction

endpackage
