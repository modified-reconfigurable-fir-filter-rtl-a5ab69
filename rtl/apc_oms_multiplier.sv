// apc_oms_multiplier: LUT-based multiplier of a 5-bit unsigned input X by a
// W-bit unsigned coefficient A, using anti-symmetric product coding (APC)
// combined with odd-multiple storage (OMS).
//
// How it works. APC: for X = x4..x0 the product is 16A + X'*A when x4 = 1
// and 16A - X'*A when x4 = 0, where X' is XL = x3..x0 or its two's
// complement; so only the 16 multiples 0..15A of A are ever needed. OMS: of
// those, only the odd ones are stored (A, 3A, ..., 15A); an even multiple is
// an odd one shifted left. A ninth word, 2A, shifted three times gives the
// 16A needed for X = 00000, and RESET zeroes the LUT output for X = 10000.
// The datapath is
//   address generator -> 4-to-9 decoder -> 9-word LUT -> barrel shifter
//   (0..3 left shifts, from the control circuit) -> add/subtract cell,
// exactly the structure the document proposes; it needs 9 LUT words instead
// of the 32 of a plain product table.
//
// Interface and timing: x to p is combinational. The LUT words are loaded
// with the multiples of DEFAULT_COEF by the synchronous reset and with those
// of coef on a load strobe (this design's mechanism for reconfiguring the
// coefficient); the new coefficient applies from the next clock edge.
module apc_oms_multiplier
  import lut_mult_pkg::*;
#(
  parameter int unsigned W = 8,                 // coefficient width
  parameter logic [W-1:0] DEFAULT_COEF = W'(1)  // coefficient after reset
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  input  logic         load,   // store a new coefficient
  input  logic [W-1:0] coef,
  input  x_word_t      x,      // input X
  output logic [W+4:0] p       // product A*X
);

  logic [3:0]   xp;
  lut_addr_t    d;
  wsel_t        w;
  logic [1:0]   s;
  logic         clr;
  logic [W+3:0] lut_word;
  logic [W-1:0] a;
  logic [W+6:0] shifted;

  apc_addr_gen u_addr (.x(x), .xp(xp), .d(d));

  oms_shift_ctrl u_ctrl (.xp(xp[2:0]), .x4(x[4]), .d3(d[3]), .s(s), .reset(clr));

  addr_dec_4to9 u_dec (.d(d), .w(w));

  oms_lut #(.W(W), .DEFAULT_COEF(DEFAULT_COEF)) u_lut (
    .clk(clk), .rst(rst), .load(load), .coef(coef),
    .wsel(w), .clr(clr), .dout(lut_word), .a_out(a)
  );

  barrel_shifter #(.DW(W+4)) u_shift (.din(lut_word), .s(s), .dout(shifted));

  // The shifted APC word never exceeds 16A, which fits in W+5 bits.
  apc_add_sub #(.W(W)) u_addsub (.a(a), .word(shifted[W+4:0]), .x4(x[4]), .p(p));

  a_apc_word_range: assert property (@(posedge clk) disable iff (rst) shifted[W+6:W+5] == 2'b00)
    else $error("apc_oms_multiplier: shifted APC word exceeds W+5 bits");

endmodule
