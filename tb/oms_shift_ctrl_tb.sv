// oms_shift_ctrl_tb: exhaustive check of the control circuit. The expected
// shift count is the number of trailing zeros of x'2..x'0 (3 when all are
// zero) and RESET is expected exactly when d3 and x4 are both high.
module oms_shift_ctrl_tb;
  logic [2:0] xp;
  logic       x4, d3;
  logic [1:0] s;
  logic       reset;
  int checks = 0, failures = 0;

  oms_shift_ctrl dut (.xp(xp), .x4(x4), .d3(d3), .s(s), .reset(reset));

  function automatic int tz(int v);
    int n = 0;
    if (v == 0) return 3;
    while (v % 2 == 0) begin v = v / 2; n++; end
    return n;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      {d3, x4, xp} = 5'(v);
      #1;
      checks++;
      if (int'(s) != tz(v % 8)) begin
        failures++;
        $display("FAIL s for x'=%b: got %0d want %0d", xp, s, tz(v % 8));
      end
      checks++;
      if (reset != (d3 && x4)) begin
        failures++;
        $display("FAIL reset for d3=%b x4=%b: got %b", d3, x4, reset);
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
