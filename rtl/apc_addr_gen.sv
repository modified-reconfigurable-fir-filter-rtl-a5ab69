// apc_addr_gen: address generator of the APC-OMS LUT multiplier (L = 5).
//
// Purely combinational. It maps the 5-bit input X = x4..x0 to the LUT
// address in two steps:
//   1. APC mapping: X' = XL when x4 = 1, and the 4-bit two's complement of XL
//      when x4 = 0, where XL = x3..x0. The product is then 16A + X'*A for
//      x4 = 1 and 16A - X'*A for x4 = 0.
//   2. OMS mapping: X' is right-shifted until it is odd (X''), and the LUT
//      address of the odd multiple X''*A is d2 d1 d0 = x''3 x''2 x''1, with
//      d3 = 0. When X' = 0 (X = 00000 or 10000) the address is 1000, the word
//      2A, which the shifter turns into 16A (and RESET clears for X = 10000).
// Outputs: xp (X', used by the control circuit) and d (LUT address).
// The mapping relations are the document's, and so is the gate budget of
// the APC mapping (three XOR, three AND, two OR gates and an inverter),
// which the conditional two's complement below meets. The OMS step is
// written behaviourally (a priority on the low bits of X'), as the gate form
// of that part is not reproduced. The two's complement is taken before the
// trailing zeros are removed, which yields the same address as removing
// them first.
module apc_addr_gen
  import lut_mult_pkg::*;
(
  input  x_word_t   x,   // multiplier input X
  output logic [3:0] xp, // APC-mapped word X'
  output lut_addr_t  d   // LUT address d3..d0
);

  logic       nx4, or01, or012;
  logic [2:0] xpp; // x''3 x''2 x''1 of X'' (X' with trailing zeros removed)

  always_comb begin
    // Conditional two's complement: bit i flips when x4 = 0 and any lower
    // bit of XL is one (three XOR, three AND, two OR and one NOT gate).
    nx4   = ~x[4];
    or01  = x[0] | x[1];
    or012 = or01 | x[2];
    xp[0] = x[0];
    xp[1] = x[1] ^ (x[0] & nx4);
    xp[2] = x[2] ^ (or01 & nx4);
    xp[3] = x[3] ^ (or012 & nx4);
    if (xp[0])      xpp = xp[3:1];
    else if (xp[1]) xpp = {1'b0, xp[3:2]};
    else if (xp[2]) xpp = {2'b00, xp[3]};
    else            xpp = 3'b000;  // X'' = 0001 (from 1000) or X' = 0
    d = {xp == 4'd0, xpp};
  end

endmodule
