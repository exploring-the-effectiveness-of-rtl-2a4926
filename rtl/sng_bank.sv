// sng_bank: stochastic coefficient generation with one shared LFSR.
//
// Produces the M coefficient bit streams of the filter. A single k-bit LFSR
// feeds the comparator of tap 0 directly; tap i compares against the word
// of tap i-1 rotated by SHIFT bits (a chain of M-1 circular-shift blocks),
// so M comparators share one random source without producing maximally
// correlated streams. Tap i outputs 1 when its random word is below
// w_bin[i], so its density of ones is w_bin[i] / 2^k. For the XNOR
// multipliers of the filter this is a bipolar coefficient
// w = 2 * w_bin / 2^k - 1, i.e. w_bin = (w + 1) * 2^(k-1).
//
// Structure (LFSR, chain of circular shifts, one comparator per tap) follows
// the reference design; the rotation direction (right) and s = 1 are this
// design's own choices. The coefficient words are inputs here, so they may
// be tied to constants or loaded from registers outside this block.
//
// Timing: the LFSR advances every clock; w_bit is combinational from the
// LFSR register and w_bin.
module sng_bank #(
  parameter int unsigned       K_BITS = sdm_sc_pkg::DEF_K_BITS,  // k
  parameter int unsigned       TAPS   = sdm_sc_pkg::DEF_TAPS,    // M
  parameter int unsigned       SHIFT  = sdm_sc_pkg::DEF_SHIFT,   // s
  parameter logic [K_BITS-1:0] SEED   = K_BITS'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [K_BITS-1:0] w_bin [TAPS],  // coefficient words W_i
  output logic              w_bit [TAPS],  // coefficient streams w_i
  output logic [K_BITS-1:0] r_word         // LFSR word, for observation
);

  logic [K_BITS-1:0] rw [TAPS];  // random word of each tap

  lfsr #(.K_BITS(K_BITS), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .r    (rw[0])
  );

  if (SHIFT < 1 || SHIFT >= K_BITS) begin : g_bad_shift
    $error("sng_bank: SHIFT must satisfy 0 < SHIFT < K_BITS");
  end

  // Circular shift blocks: rotate the previous tap's word right by SHIFT.
  // Because the LFSR shifts left, the rotated word equals the LFSR word of
  // SHIFT clocks earlier in its low K_BITS - SHIFT bits. A fixed rotation
  // is only wiring.
  for (genvar i = 1; i < TAPS; i++) begin : g_shift
    assign rw[i] = {rw[i-1][SHIFT-1:0], rw[i-1][K_BITS-1:SHIFT]};
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_sng
    sng #(.K_BITS(K_BITS)) u_sng (
      .r(rw[i]),
      .b(w_bin[i]),
      .s(w_bit[i])
    );
  end

  assign r_word = rw[0];

endmodule
