// sc_fir: M-tap FIR filter on a single-bit stream, stochastic multipliers.
//
// Computes Z_n = sum_i XNOR(w_i, V_{n-i}) for i = 0 .. M-1. A delay line of
// M-1 flip-flops holds the past input bits; each tap multiplies its bit
// with the coefficient stream w_i by an XNOR gate (bipolar stochastic
// multiplication: with both operands read as +-1, XNOR is their product);
// a binary adder counts the ones of the M products. Z_n lies in 0 .. M and
// its bipolar value is 2 * Z_n - M, the filter output sample.
//
// Delay line, XNOR multipliers and a binary adder in place of a MUX adder
// follow the reference design. Z is ceil(log2(M + 1)) bits wide, which is
// the reference design's ceil(log2 M) for its 5 taps and also holds the
// all-ones sum M for other tap counts. There is no output register, so Z
// is combinational from the input bit, the delay line and the coefficient
// streams. The delay line is cleared by the asynchronous active-low reset.
module sc_fir #(
  parameter int unsigned TAPS   = sdm_sc_pkg::DEF_TAPS,  // M
  parameter int unsigned Z_BITS = $clog2(TAPS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              v,             // input bit V_n
  input  logic              w_bit [TAPS],  // coefficient streams w_i
  output logic [Z_BITS-1:0] z              // ones count Z_n
);

  if (TAPS < 2) begin : g_bad_taps
    $error("sc_fir: TAPS must be at least 2");
  end

  logic [TAPS-1:1] dly;   // dly[i] = V_{n-i}
  logic [TAPS-1:0] taps;  // V_n, V_{n-1}, ..., V_{n-M+1}
  logic [TAPS-1:0] prod;  // XNOR products

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '0;
    end else begin
      dly[1] <= v;
      for (int i = 2; i < TAPS; i++) dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    taps = {dly, v};
    z    = '0;
    for (int i = 0; i < TAPS; i++) begin
      prod[i] = ~(w_bit[i] ^ taps[i]);
      z       = z + Z_BITS'(prod[i]);
    end
  end

endmodule
