// lfsr: k-bit linear-feedback shift register extended to all 2^k states.
//
// A Fibonacci LFSR that shifts left: the new bit, the XOR of the tap bits
// given by sdm_sc_pkg::lfsr_taps(K_BITS), enters at bit 0. The feedback is
// also inverted when bits K_BITS-2..0 are all zero, which splices the
// all-zero word into the maximal-length cycle (a de Bruijn counter). The
// register therefore steps through every value 0 .. 2^k - 1 exactly once
// in N = 2^k clocks, so that it is uniform over that range as the stochastic
// number generators assume, and then repeats.
//
// The reference design calls for a k-bit LFSR uniform over 0 .. 2^k - 1 and
// a sequence length of N = 2^k; the polynomial, the zero-state extension,
// the shift direction and the seed are this design's own choices.
//
// Interface: r is the register itself; it advances on every rising clk edge
// and is loaded with SEED by the asynchronous active-low reset.
module lfsr #(
  parameter int unsigned     K_BITS = sdm_sc_pkg::DEF_K_BITS,  // k
  parameter logic [K_BITS-1:0] SEED = K_BITS'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [K_BITS-1:0] r
);

  localparam logic [31:0]       TAPS32 = sdm_sc_pkg::lfsr_taps(K_BITS);
  localparam logic [K_BITS-1:0] TAPS   = TAPS32[K_BITS-1:0];

  if (K_BITS < 2 || K_BITS > 20) begin : g_bad_width
    $error("lfsr: K_BITS must be between 2 and 20");
  end

  logic fb;

  always_comb begin
    fb = ^(r & TAPS);
    if (r[K_BITS-2:0] == '0) fb = ~fb;  // visit the all-zero word as well
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= SEED;
    else        r <= {r[K_BITS-2:0], fb};
  end

endmodule
