// apc_add_sub_tb: random coefficients and APC words in 0..16A; the result
// must be 16A + word for x4 = 1 and 16A - word for x4 = 0.
module apc_add_sub_tb;
  localparam int unsigned W = 8;
  logic [W-1:0] a;
  logic [W+4:0] word;
  logic         x4;
  logic [W+4:0] p;
  int checks = 0, failures = 0;

  apc_add_sub #(.W(W)) dut (.a(a), .word(word), .x4(x4), .p(p));

  task automatic run(int av, int wv, bit add);
    int want;
    a = W'(av); word = (W+5)'(wv); x4 = add;
    #1;
    want = add ? 16 * av + wv : 16 * av - wv;
    checks++;
    if (int'(p) != want) begin
      failures++;
      $display("FAIL a=%0d word=%0d x4=%0d: got %0d want %0d", av, wv, add, p, want);
    end
  endtask

  initial begin
    run(255, 255 * 15, 1);   // 31A, the largest product
    run(255, 255 * 16, 0);   // 0
    run(0, 0, 1);
    for (int i = 0; i < 300; i++) begin
      int av = int'($urandom % 256);
      int k  = int'($urandom % 17);
      run(av, av * k, 1'($urandom));
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
