// barrel_shifter_tb: random inputs at every shift count, plus the all-ones
// input, compared with a multiplication by 2^s.
module barrel_shifter_tb;
  localparam int unsigned DW = 12;
  logic [DW-1:0] din;
  logic [1:0]    s;
  logic [DW+2:0] dout;
  int checks = 0, failures = 0;

  barrel_shifter #(.DW(DW)) dut (.din(din), .s(s), .dout(dout));

  task automatic run(logic [DW-1:0] v);
    for (int k = 0; k < 4; k++) begin
      longint want;
      din = v;
      s   = 2'(k);
      #1;
      want = longint'(v) * (longint'(1) << k);
      checks++;
      if (longint'(dout) != want) begin
        failures++;
        $display("FAIL %h << %0d: got %h want %h", v, k, dout, want);
      end
    end
  endtask

  initial begin
    run('1);
    run(DW'(1));
    for (int i = 0; i < 200; i++) run(DW'($urandom));
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
