// apc_oms_multiplier_tb: every 5-bit input X against the integer product
// A*X, for the default coefficient after reset and for coefficients loaded
// afterwards (0, 1, the largest, and random ones), at W = 8 and W = 16. It also counts the paths
// through the multiplier: each shift count, RESET, add and subtract.
module apc_oms_multiplier_tb;
  import lut_mult_pkg::*;
  localparam int unsigned W = 8;

  logic         clk = 0, rst = 1, load = 0;
  logic [W-1:0] coef = '0;
  x_word_t      x = '0;
  logic [W+4:0] p;
  int checks = 0, failures = 0;
  int n_shift [4] = '{0, 0, 0, 0};
  int n_reset = 0, n_add = 0, n_sub = 0;
  int coef_w_now = 40000;  // coefficient held by the wide instance

  apc_oms_multiplier #(.W(W), .DEFAULT_COEF(8'd13)) dut (
    .clk(clk), .rst(rst), .load(load), .coef(coef), .x(x), .p(p)
  );

  // A second, wider instance shows that the structure holds for any W.
  localparam int unsigned WW = 16;
  logic [WW-1:0] coef_w = '0;
  logic [WW+4:0] p_w;
  apc_oms_multiplier #(.W(WW), .DEFAULT_COEF(16'd40000)) dut_w (
    .clk(clk), .rst(rst), .load(load), .coef(coef_w), .x(x), .p(p_w)
  );

  always #5 clk = ~clk;

  task automatic sweep(int a);
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (int'(p) != a * v) begin
        failures++;
        $display("FAIL A=%0d X=%0d: got %0d want %0d", a, v, p, a * v);
      end
      checks++;
      if (int'(p_w) != int'(coef_w_now) * v) begin
        failures++;
        $display("FAIL W=16 A=%0d X=%0d: got %0d want %0d", coef_w_now, v, p_w, int'(coef_w_now) * v);
      end
      n_shift[dut.s]++;
      if (dut.clr) n_reset++;
      if (x[4]) n_add++; else n_sub++;
    end
  endtask

  task automatic load_coef(int a);
    coef = W'(a); load = 1;
    coef_w = WW'(a * 257);
    coef_w_now = (a * 257) % 65536;
    @(posedge clk); #1 load = 0;
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    sweep(13);
    load_coef(0);   sweep(0);
    load_coef(1);   sweep(1);
    load_coef(255); sweep(255);
    for (int i = 0; i < 20; i++) begin
      int a = int'($urandom % 256);
      load_coef(a); sweep(a);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_shift[k] == 0) begin failures++; $display("FAIL shift %0d never used", k); end
    end
    checks++; if (n_reset == 0) begin failures++; $display("FAIL RESET never used"); end
    checks++; if (n_add == 0 || n_sub == 0) begin failures++; $display("FAIL add or subtract never used"); end
    $display("paths: shifts %0d/%0d/%0d/%0d reset %0d add %0d sub %0d",
             n_shift[0], n_shift[1], n_shift[2], n_shift[3], n_reset, n_add, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
