// addr_dec_4to9: 4-to-9-line address decoder of the APC-OMS LUT.
//
// Purely combinational. As in the document, it is a 3-to-8-line decoder of
// d2 d1 d0 enabled by NOT d3, plus a ninth line w8 = d3 that selects the
// word 2A at address 1000. Exactly one of w0..w8 is high for every address
// the address generator can produce (d3 = 1 only with d2..d0 = 000); for the
// unused addresses 1001..1111 only w8 is high.
module addr_dec_4to9
  import lut_mult_pkg::*;
(
  input  lut_addr_t d,  // LUT address d3..d0
  output wsel_t     w   // one-hot word selects w8..w0
);

  always_comb begin
    for (int i = 0; i < 8; i++) w[i] = ~d[3] & (d[2:0] == 3'(i));
    w[8] = d[3];
  end

endmodule
