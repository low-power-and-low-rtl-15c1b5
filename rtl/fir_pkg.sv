// fir_pkg: sizes shared by the FIR filter variants.
//
// All filters in this design work on the same stream: 8-bit two's-complement
// input samples and 8-bit unsigned coefficients, with 8 taps. The 8-bit word
// sizes and the 8-tap length follow the evaluated configuration; treating the
// coefficient as unsigned follows the Booth recoding rule used here (the
// multiplier operand is padded with zeros, not sign-extended). The package
// also holds the Booth control-bit struct passed from encoder to partial
// product generator, and a small width helper.
package fir_pkg;

  parameter int unsigned DATA_W = 8;   // input sample width (signed)
  parameter int unsigned COEF_W = 8;   // coefficient width (unsigned)
  parameter int unsigned TAPS   = 8;   // filter length N

  // Radix-4 Booth control bits of one multiplier triplet.
  typedef struct packed {
    logic dir;    // multiplicand is negated
    logic shift;  // use 2x (multiplicand shifted left once)
    logic add;    // use 1x
  } booth_ctrl_t;

  // Bits needed to hold any value 0..n-1 (at least 1).
  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
