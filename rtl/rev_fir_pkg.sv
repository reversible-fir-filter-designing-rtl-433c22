// rev_fir_pkg: shared sizes of the reversible-logic FIR filter.
//
// The filter is an 8-tap direct-form FIR whose input samples and coefficients
// are both 8-bit words; these two numbers follow the filter specification.
// The accumulator width is derived here so that the sum of all tap products
// can never overflow: an 8x8 unsigned product needs 16 bits and adding eight
// of them needs $clog2(8) = 3 more, giving 19 bits.
package rev_fir_pkg;
  parameter int unsigned TAPS   = 8;  // filter length (taps c0..c7)
  parameter int unsigned DATA_W = 8;  // input sample width
  parameter int unsigned COEF_W = 8;  // coefficient width

  // Width of a full-precision sum of n products of a dw-bit and a cw-bit word.
  function automatic int unsigned acc_width(int unsigned dw, int unsigned cw, int unsigned n);
    return dw + cw + ((n > 1) ? $clog2(n) : 0);
  endfunction
endpackage
