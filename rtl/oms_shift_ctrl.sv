// oms_shift_ctrl: control circuit of the APC-OMS LUT multiplier.
//
// Purely combinational. From the APC-mapped word X' = x'3..x'0 it makes the
// 2-bit shift count (s1 s0) that the barrel shifter applies to the LUT word,
// i.e. the number of trailing zeros of X' (3 when X' = 1000 or 0000, the
// latter turning the stored 2A into 16A):
//   s0 = NOT( x'0 OR NOT( x'1 OR NOT x'2 ) )
//   s1 = NOT( x'0 OR x'1 )
// x'3 does not enter: when x'2..x'0 are all zero the count is 3 whether X'
// is 1000 or 0000. It also makes the active-high RESET that clears the LUT
// output for X = 10000, whose APC word is zero: RESET = d3 AND x4. These
// gate equations are the document's.
module oms_shift_ctrl (
  input  logic [2:0] xp,    // x'2 x'1 x'0 of the APC-mapped word X'
  input  logic       x4,    // input MSB x4
  input  logic       d3,    // LUT address MSB (X' == 0)
  output logic [1:0] s,     // shift count s1 s0
  output logic       reset  // clear the LUT output
);

  always_comb begin
    s[0]  = ~(xp[0] | ~(xp[1] | ~xp[2]));
    s[1]  = ~(xp[0] | xp[1]);
    reset = d3 & x4;
  end

endmodule
