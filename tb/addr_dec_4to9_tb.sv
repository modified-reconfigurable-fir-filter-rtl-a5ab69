// addr_dec_4to9_tb: exhaustive check of the 4-to-9 decoder. Addresses
// 0000..0111 must raise only w[address]; 1000..1111 only w8.
module addr_dec_4to9_tb;
  import lut_mult_pkg::*;
  lut_addr_t d;
  wsel_t     w;
  int checks = 0, failures = 0;

  addr_dec_4to9 dut (.d(d), .w(w));

  initial begin
    for (int v = 0; v < 16; v++) begin
      wsel_t want;
      d = 4'(v);
      #1;
      want = (v < 8) ? wsel_t'(1) << v : wsel_t'(9'h100);
      checks++;
      if (w !== want) begin
        failures++;
        $display("FAIL d=%b: w=%b want %b", d, w, want);
      end
    end
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
