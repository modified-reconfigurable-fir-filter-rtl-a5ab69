// barrel_shifter: two-stage logarithmic left shifter of the APC-OMS LUT
// multiplier.
//
// Purely combinational. The first stage shifts left by one position when
// s0 = 1, the second by two positions when s1 = 1, so the output is the
// input shifted left by 0..3 positions (s1 s0 in binary), as the document
// specifies. The output is three bits wider than the input so that no bit is
// lost; the width DW is this design's parameter.
module barrel_shifter #(
  parameter int unsigned DW = 12  // input width (W+4 in the multiplier)
) (
  input  logic [DW-1:0] din,
  input  logic [1:0]    s,        // shift count s1 s0
  output logic [DW+2:0] dout
);

  logic [DW+2:0] stage1;

  always_comb begin
    stage1 = s[0] ? {2'b00, din, 1'b0} : {3'b000, din};
    dout   = s[1] ? {stage1[DW:0], 2'b00} : stage1;
  end

endmodule
