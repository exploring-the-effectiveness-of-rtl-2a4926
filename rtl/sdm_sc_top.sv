// sdm_sc_top: SDM-SC processing scheme, a sigma-delta encoder followed by a
// stochastic-computing FIR filter.
//
// A multi-bit input is turned into a single-bit stream by a first-order
// digital sigma-delta modulator running at the oversampled rate f_s. The
// stream, read as +-1, is filtered by an M-tap FIR filter whose multipliers
// are XNOR gates fed with stochastic coefficient streams; the coefficient
// streams come from one shared LFSR through a chain of circular shifts and
// one comparator per tap. A binary adder sums the M products into Z_n.
//
// Blocks: sdm (modulator), sng_bank (lfsr, circular shifts, sng), sc_fir.
// With the default sizes (m = k = 15, c = 16, M = 5) the design holds
// 16 + 15 + 4 = 35 flip-flops: the modulator register, the LFSR and the
// delay line.
//
// Interface and timing: one input sample u per rising clk edge (two's
// complement, value u / 2^(m-1)); w_coef[i] is the unsigned coefficient
// word of tap i, a bipolar coefficient w being coded as (w + 1) * 2^(k-1),
// and is expected to stay constant. v is the modulator bit (1: +1, 0: -1),
// one clock after its input sample; z in 0 .. M is combinational from the
// register state, and 2 * z - M is the bipolar output sample, an unbiased
// estimate of sum_i w_i * u_{n-i-1} that is averaged (low-pass filtered,
// decimated) downstream. y and r_word bring out the modulator register and
// the LFSR word for observation. rst_n is an asynchronous active-low reset.
module sdm_sc_top #(
  parameter int unsigned       M_BITS = sdm_sc_pkg::DEF_M_BITS,  // m
  parameter int unsigned       C_BITS = sdm_sc_pkg::DEF_C_BITS,  // c
  parameter int unsigned       K_BITS = sdm_sc_pkg::DEF_K_BITS,  // k
  parameter int unsigned       TAPS   = sdm_sc_pkg::DEF_TAPS,    // M
  parameter int unsigned       SHIFT  = sdm_sc_pkg::DEF_SHIFT,   // s
  parameter logic [K_BITS-1:0] SEED   = K_BITS'(1),
  parameter int unsigned       Z_BITS = $clog2(TAPS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [M_BITS-1:0] u,              // input sample U_n
  input  logic        [K_BITS-1:0] w_coef [TAPS],  // coefficient words
  output logic                     v,              // SDM output bit V_n
  output logic        [Z_BITS-1:0] z,              // filter output Z_n
  output logic signed [C_BITS-1:0] y,              // SDM register Y_n
  output logic        [K_BITS-1:0] r_word          // shared LFSR word
);

  logic              w_bit [TAPS];

  sdm #(.M_BITS(M_BITS), .C_BITS(C_BITS)) u_sdm (
    .clk  (clk),
    .rst_n(rst_n),
    .u    (u),
    .v    (v),
    .y    (y)
  );

  sng_bank #(
    .K_BITS(K_BITS), .TAPS(TAPS), .SHIFT(SHIFT), .SEED(SEED)
  ) u_sng_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .w_bin (w_coef),
    .w_bit (w_bit),
    .r_word(r_word)
  );

  sc_fir #(.TAPS(TAPS), .Z_BITS(Z_BITS)) u_fir (
    .clk  (clk),
    .rst_n(rst_n),
    .v    (v),
    .w_bit(w_bit),
    .z    (z)
  );

endmodule
