// fir_filter_tb: end-to-end test of the FIR filter at its default size.
//
// A random stream of 5-bit samples, with idle cycles mixed in, is filtered
// and every output is compared with y(n) = sum h(k) x(n-k) computed here
// from a sample history and a copy of the coefficients. Coefficients are
// reloaded during the stream, including the extremes 0 and 2^W-1, and a run
// of all-maximum samples checks that the output cannot overflow. The
// latency (one clock edge) is checked through out_valid. The test counts
// how often each mechanism of the LUT multiplier occurred in tap 0 (each
// shift count, RESET for X = 10000, the 16A word for X = 00000, add and
// subtract) and of the filter (coefficient reload, idle cycle), and fails
// if one never did. It also rechecks the filter after a mid-stream reset.
module fir_filter_tb;
  import lut_mult_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned W  = 8;
  localparam int unsigned TW = 2;
  localparam int unsigned YW = W + XL + $clog2(N);
  localparam int NSAMPLES = 3000;

  logic          clk = 0, rst = 1, in_valid = 0, coef_we = 0;
  x_word_t       x_in = '0;
  logic [TW-1:0] coef_tap = '0;
  logic [W-1:0]  coef_data = '0;
  logic          out_valid;
  logic [YW-1:0] y;

  int checks = 0, failures = 0;
  // Reference state.
  int h    [N] = '{25, 103, 103, 25};
  int hist [N] = '{0, 0, 0, 0};   // hist[k] = x(n-k) of the last sample taken
  int exp_y = 0;
  bit exp_valid = 0;
  // Mechanism counters.
  int n_shift [4] = '{0, 0, 0, 0};
  int n_reset = 0, n_zero = 0, n_add = 0, n_sub = 0, n_reload = 0, n_idle = 0, n_outputs = 0;

  fir_filter dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x_in(x_in),
    .coef_we(coef_we), .coef_tap(coef_tap), .coef_data(coef_data),
    .out_valid(out_valid), .y(y)
  );

  always #5 clk = ~clk;

  // Reference model, updated at every clock edge from the inputs that were
  // set up before it.
  always @(posedge clk) begin
    if (rst) begin
      exp_valid <= 0;
      exp_y     <= 0;
      hist      <= '{0, 0, 0, 0};
      h         <= '{25, 103, 103, 25};
    end else begin
      exp_valid <= in_valid;
      if (in_valid) begin
        int acc;
        acc = int'(x_in) * h[0];
        for (int k = 1; k < N; k++) acc += hist[k - 1] * h[k];
        exp_y <= acc;
        for (int k = N - 1; k > 0; k--) hist[k] <= hist[k - 1];
        hist[0] <= int'(x_in);
      end else n_idle++;
      if (coef_we) begin
        h[coef_tap] <= int'(coef_data);
        n_reload++;
      end
      if (in_valid) begin
        n_shift[dut.g_tap[0].u_mult.s]++;
        if (dut.g_tap[0].u_mult.clr) n_reset++;
        if (x_in == 5'd0) n_zero++;
        if (x_in[4]) n_add++; else n_sub++;
      end
    end
  end

  // Compare after each edge.
  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if (out_valid != exp_valid) begin
        failures++;
        $display("FAIL %0t: out_valid %b want %b", $time, out_valid, exp_valid);
      end else if (out_valid) begin
        n_outputs++;
        if (int'(y) != exp_y) begin
          failures++;
          $display("FAIL %0t: y %0d want %0d", $time, y, exp_y);
        end
      end
    end
  end

  task automatic step(bit valid, int xv, bit we, int tap, int cv);
    in_valid = valid; x_in = 5'(xv);
    coef_we = we; coef_tap = TW'(tap); coef_data = W'(cv);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Impulse: the output reproduces the coefficients.
    step(1, 1, 0, 0, 0);
    for (int i = 0; i < N + 1; i++) step(1, 0, 0, 0, 0);
    // Every input value once.
    for (int v = 0; v < 32; v++) step(1, v, 0, 0, 0);
    // All-maximum coefficients and samples: the largest output.
    for (int k = 0; k < N; k++) step(0, 0, 1, k, (1 << W) - 1);
    for (int i = 0; i < N + 2; i++) step(1, 31, 0, 0, 0);
    // Zero coefficient on one tap.
    step(1, 17, 1, 2, 0);
    // Random stream with idle cycles and coefficient reloads.
    for (int i = 0; i < NSAMPLES; i++) begin
      automatic bit we = ($urandom % 50) == 0;
      step(($urandom % 8) != 0, int'($urandom % 32), we, int'($urandom % N), int'($urandom % 256));
    end
    // Reset in mid-stream returns the default coefficients and clears the history.
    rst = 1; @(posedge clk); #1 rst = 0;
    step(1, 1, 0, 0, 0);
    for (int i = 0; i < N; i++) step(1, 0, 0, 0, 0);
    for (int i = 0; i < 200; i++) step(1, int'($urandom % 32), 0, 0, 0);
    step(0, 0, 0, 0, 0);
    step(0, 0, 0, 0, 0);

    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_shift[k] == 0) begin failures++; $display("FAIL shift count %0d never happened", k); end
    end
    checks++; if (n_reset  == 0) begin failures++; $display("FAIL LUT RESET never happened"); end
    checks++; if (n_zero   == 0) begin failures++; $display("FAIL X=00000 (16A word) never happened"); end
    checks++; if (n_add == 0 || n_sub == 0) begin failures++; $display("FAIL add or subtract never happened"); end
    checks++; if (n_reload == 0) begin failures++; $display("FAIL coefficient reload never happened"); end
    checks++; if (n_idle   == 0) begin failures++; $display("FAIL idle cycle never happened"); end
    $display("mechanisms: shift0=%0d shift1=%0d shift2=%0d shift3=%0d reset=%0d zero=%0d add=%0d sub=%0d reload=%0d idle=%0d outputs=%0d",
             n_shift[0], n_shift[1], n_shift[2], n_shift[3], n_reset, n_zero, n_add, n_sub,
             n_reload, n_idle, n_outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMPLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
