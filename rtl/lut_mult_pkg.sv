// lut_mult_pkg: constants and helpers shared by the APC-OMS LUT multiplier
// and the FIR filter built from it.
//
// The multiplier handles an unsigned input word of L = 5 bits (the word
// length that the anti-symmetric product coding (APC) and odd-multiple
// storage (OMS) scheme is worked out for) and an unsigned coefficient of any
// width W. Its LUT holds nine words: the eight odd multiples A*(2i+1),
// i = 0..7, at addresses 0..7, and 2A at address 8, from which 16A is made
// by three left shifts. oms_word() gives the content of one LUT word and is
// used both by the LUT's coefficient load and by the testbenches' models.
package lut_mult_pkg;

  // Input word length L of the multiplier. The address mapping, the control
  // equations and the 4-to-9 decoder are specific to L = 5.
  localparam int unsigned XL = 5;
  // Number of LUT words: 2^(L-1)/2 odd multiples plus the word 2A.
  localparam int unsigned LUT_WORDS = 9;
  // LUT address width (d3 d2 d1 d0).
  localparam int unsigned AW = 4;

  typedef logic [XL-1:0] x_word_t;
  typedef logic [AW-1:0] lut_addr_t;
  typedef logic [LUT_WORDS-1:0] wsel_t;

  // Content of LUT word i for coefficient a, truncated to the caller's
  // (W+4)-bit word: A*(2i+1) for i = 0..7 and 2A for i = 8.
  function automatic logic [31:0] oms_word(input logic [31:0] a, input int unsigned i);
    if (i == LUT_WORDS - 1) return a << 1;
    return a * (2 * i + 1);
  endfunction

endpackage
