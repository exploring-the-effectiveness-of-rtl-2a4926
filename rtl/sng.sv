// sng: comparator of a stochastic number generator.
//
// Outputs 1 when the random word r is below the binary number b. With r
// uniform over 0 .. 2^k - 1 the output is a bit stream whose density of
// ones is b / 2^k. This is the reference design's comparator "R < B"; as
// elsewhere in this design b is unsigned. Purely combinational.
module sng #(
  parameter int unsigned K_BITS = sdm_sc_pkg::DEF_K_BITS  // k
) (
  input  logic [K_BITS-1:0] r,   // random word
  input  logic [K_BITS-1:0] b,   // binary number to encode
  output logic              s    // stochastic bit
);

  assign s = (r < b);

endmodule
