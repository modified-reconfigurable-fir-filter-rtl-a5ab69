// apc_add_sub: add/subtract cell of the APC LUT multiplier.
//
// Purely combinational. It forms the product from the APC word delivered by
// the LUT and barrel shifter: product = 16A + word when x4 = 1 and
// 16A - word when x4 = 0, so x4 is the add/subtract control, as in the
// document. 16A is the coefficient A shifted left by four. For the words
// this design feeds it (0..16A) the result lies in 0..31A and fits in W+5
// bits; no overflow can occur.
module apc_add_sub #(
  parameter int unsigned W = 8  // coefficient width
) (
  input  logic [W-1:0] a,     // coefficient A
  input  logic [W+4:0] word,  // shifted APC word
  input  logic         x4,    // 1: add, 0: subtract
  output logic [W+4:0] p      // product A*X
);

  logic [W+4:0] a16;

  always_comb begin
    a16 = {1'b0, a, 4'b0000};
    p   = x4 ? a16 + word : a16 - word;
  end

endmodule
