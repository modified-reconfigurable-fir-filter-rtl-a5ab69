// fir_filter: direct-form FIR filter whose every tap multiplier is an
// APC-OMS LUT multiplier (apc_oms_multiplier).
//
// It computes y(n) = sum_{k=0}^{N-1} h(k) * x(n-k) for unsigned 5-bit
// samples x and unsigned W-bit coefficients h. The current sample feeds the
// multiplier of tap 0 directly and a chain of N-1 registers delays it for
// taps 1..N-1 (the direct form of the document); the N products are summed
// and registered.
//
// Reconfiguration: each tap's LUT holds the odd multiples of its
// coefficient. Writing coef_data to tap coef_tap with coef_we reloads that
// LUT in one clock; the new coefficient is used from the next sample on.
// After reset the coefficients are COEFS and the delay line is cleared.
//
// Timing: one sample per clock cycle in which in_valid is high; y and
// out_valid follow one clock edge later (latency 1, throughput 1 sample per
// clock). The delay line only advances on valid samples. The number of taps,
// the coefficient width, the default coefficients, the register placement
// and the coefficient-load port are this design's choices; the document
// fixes only the 5-bit input word and the multiplier structure.
module fir_filter
  import lut_mult_pkg::*;
#(
  parameter int unsigned  N = 4,                                   // taps
  parameter int unsigned  W = 8,                                   // coefficient width
  parameter logic [W-1:0] COEFS [N] = '{8'd25, 8'd103, 8'd103, 8'd25}, // h(0)..h(N-1) after reset
  localparam int unsigned TW = (N > 1) ? $clog2(N) : 1,            // tap index width
  localparam int unsigned YW = W + XL + $clog2(N)                  // output width
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,   // x_in holds a new sample
  input  x_word_t       x_in,       // sample x(n)
  input  logic          coef_we,    // load coef_data into tap coef_tap
  input  logic [TW-1:0] coef_tap,
  input  logic [W-1:0]  coef_data,
  output logic          out_valid,  // y holds y(n)
  output logic [YW-1:0] y
);

  x_word_t      taps [N];   // taps[k] = x(n-k)
  x_word_t      dly  [N];   // dly[k]  = x(n-k) for k >= 1, registered
  logic [W+4:0] prod [N];
  logic [YW-1:0] sum;

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k < N; k++) taps[k] = dly[k];
  end

  for (genvar k = 0; k < N; k++) begin : g_tap
    apc_oms_multiplier #(.W(W), .DEFAULT_COEF(COEFS[k])) u_mult (
      .clk(clk), .rst(rst),
      .load(coef_we && coef_tap == TW'(k)),
      .coef(coef_data),
      .x(taps[k]),
      .p(prod[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 1; k < N; k++) dly[k] <= taps[k-1];
    end
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < N; k++) sum += YW'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sum;
    end
  end

endmodule
