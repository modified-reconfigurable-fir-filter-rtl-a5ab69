// apc_addr_gen_tb: exhaustive check of the address generator over all 32
// inputs. The expected APC word X' and LUT address are computed here by
// plain arithmetic (two's complement of the low nibble for x4 = 0, divide
// by two until odd, address = (odd - 1) / 2, 1000 for X' = 0), and a few
// rows of the product tables are checked literally.
module apc_addr_gen_tb;
  import lut_mult_pkg::*;

  x_word_t    x;
  logic [3:0] xp;
  lut_addr_t  d;
  int checks = 0, failures = 0;

  apc_addr_gen dut (.x(x), .xp(xp), .d(d));

  function automatic int exp_xp(int v);
    int lo = v % 16;
    if (v >= 16) return lo;
    return (16 - lo) % 16;
  endfunction

  function automatic int exp_d(int v);
    int o = exp_xp(v);
    if (o == 0) return 8;
    while (o % 2 == 0) o = o / 2;
    return (o - 1) / 2;
  endfunction

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      check($sformatf("X'(%b)", x), int'(xp), exp_xp(v));
      check($sformatf("d(%b)", x), int'(d), exp_d(v));
    end
    // Literal rows: APC addresses and OMS addresses.
    x = 5'b00001; #1; check("X' 00001", int'(xp), 4'b1111);
    x = 5'b11111; #1; check("X' 11111", int'(xp), 4'b1111);
    x = 5'b10111; #1; check("X' 10111", int'(xp), 4'b0111);
    x = 5'b00000; #1; check("d 00000", int'(d), 4'b1000);
    x = 5'b10000; #1; check("d 10000", int'(d), 4'b1000);
    x = 5'b10110; #1; check("d 10110 (6A = 2x3A)", int'(d), 4'b0001);
    x = 5'b11100; #1; check("d 11100 (12A = 4x3A)", int'(d), 4'b0001);
    x = 5'b11111; #1; check("d 11111 (15A)", int'(d), 4'b0111);
    x = 5'b11000; #1; check("d 11000 (8A = 8xA)", int'(d), 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
