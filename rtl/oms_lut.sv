// oms_lut: nine-word LUT memory of the APC-OMS multiplier.
//
// Word i (i = 0..7) holds the odd multiple Pi = A*(2i+1) of the coefficient
// A, and word 8 holds 2A, each W+4 bits wide, as the document lays out. A
// word is read through the one-hot word-select lines w8..w0 of the 4-to-9
// decoder: the output is the OR of every word ANDed with its select line,
// and RESET forces the output to zero (the APC word of X = 10000).
// The read path is combinational.
//
// Reconfiguration (this design's own choice of mechanism): the words are
// flip-flops. A synchronous reset loads the multiples of DEFAULT_COEF, and a
// one-cycle load strobe stores the multiples of a new coefficient; they are
// visible at the output from the next clock edge. a_out gives A itself (the
// low W bits of P0), from which the add/subtract cell forms 16A.
module oms_lut
  import lut_mult_pkg::*;
#(
  parameter int unsigned W = 8,                      // coefficient width
  parameter logic [W-1:0] DEFAULT_COEF = W'(1)       // coefficient after reset
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  input  logic         load,   // store the multiples of coef
  input  logic [W-1:0] coef,
  input  wsel_t        wsel,   // word selects w8..w0
  input  logic         clr,    // RESET: force the output to zero
  output logic [W+3:0] dout,   // selected word
  output logic [W-1:0] a_out   // coefficient A
);

  logic [W+3:0] mem [LUT_WORDS];

  always_ff @(posedge clk) begin
    for (int i = 0; i < LUT_WORDS; i++) begin
      if (rst)       mem[i] <= (W+4)'(oms_word(32'(DEFAULT_COEF), i));
      else if (load) mem[i] <= (W+4)'(oms_word(32'(coef), i));
    end
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < LUT_WORDS; i++) dout |= mem[i] & {(W+4){wsel[i]}};
    if (clr) dout = '0;
    a_out = mem[0][W-1:0];
  end

  // The decoder must select exactly one word.
  a_wsel_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(wsel))
    else $error("oms_lut: word select is not one-hot: %b", wsel);

endmodule
