// oms_lut_tb: checks the nine-word LUT. After reset every word must hold
// the odd multiple (2i+1)*A of the default coefficient (word 8: 2A); RESET
// must clear the output; a load must store the multiples of the new
// coefficient from the next clock edge on and not before.
module oms_lut_tb;
  import lut_mult_pkg::*;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] DEF = 8'd7;

  logic         clk = 0, rst = 1, load = 0, clr = 0;
  logic [W-1:0] coef = '0;
  wsel_t        wsel = 9'b1;
  logic [W+3:0] dout;
  logic [W-1:0] a_out;
  int checks = 0, failures = 0;

  oms_lut #(.W(W), .DEFAULT_COEF(DEF)) dut (
    .clk(clk), .rst(rst), .load(load), .coef(coef), .wsel(wsel), .clr(clr),
    .dout(dout), .a_out(a_out)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic read_all(int a);
    for (int i = 0; i < 9; i++) begin
      wsel = wsel_t'(1) << i;
      #1;
      check($sformatf("word %0d of A=%0d", i, a), int'(dout), (i == 8) ? 2 * a : a * (2 * i + 1));
    end
    check("a_out", int'(a_out), a);
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    read_all(7);
    clr = 1;
    for (int i = 0; i < 9; i++) begin
      wsel = wsel_t'(1) << i; #1;
      check("cleared output", int'(dout), 0);
    end
    clr = 0;
    // Load 200; before the edge the old contents remain.
    coef = 8'd200; load = 1; wsel = 9'b1; #1;
    check("before load edge", int'(dout), 7);
    @(posedge clk); #1 load = 0;
    read_all(200);
    coef = 8'd255; load = 1;
    @(posedge clk); #1 load = 0;
    coef = 8'd3;   // not loaded: load is low
    @(posedge clk); #1;
    read_all(255);
    rst = 1; @(posedge clk); #1 rst = 0;
    read_all(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
