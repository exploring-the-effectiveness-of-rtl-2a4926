// sdm: first-order single-bit digital sigma-delta modulator.
//
// Each clock the c-bit register Y takes Y + U - V', where U is the signed
// m-bit input sample and V' is the modulator's current output read as +-1 at
// input full scale (+2^(m-1) or -2^(m-1)). The output bit V is the quantizer
// of the loop: it is taken from the register's MSB, V = 1 when Y >= 0 (MSB
// clear, read as +1) and V = 0 when Y < 0 (MSB set, read as -1). The 0/1 bit
// is turned back into +-2^(m-1) for the feedback by sign extension:
// {~V repeated, 1, zeros}. Over many samples the density of ones in V is
// (1 + U / 2^(m-1)) / 2, i.e. V is a bipolar stochastic stream of U.
//
// Following the reference design: the adder, the c-bit register with
// c = m + 1 by default, the MSB quantizer and the +-1 feedback of V. This
// design's own choices: two's complement input (U / 2^(m-1) in [-1, 1)),
// which MSB value means +1, the sign-extension form of the feedback and an
// asynchronous active-low reset that clears Y (so V starts at 1).
// With c >= m + 1, Y stays within [-2^m, 2^m) and never wraps; an assertion
// checks that the update does not overflow.
//
// Interface: u is sampled on every rising clk edge; v and y follow the
// register, so a sample first shows in v one clock after it is applied.
module sdm #(
  parameter int unsigned M_BITS = sdm_sc_pkg::DEF_M_BITS,  // m
  parameter int unsigned C_BITS = sdm_sc_pkg::DEF_C_BITS   // c
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [M_BITS-1:0] u,   // input sample U_n
  output logic                     v,   // single-bit output V_n (1: +1, 0: -1)
  output logic signed [C_BITS-1:0] y    // integrator register Y_n
);

  if (C_BITS < M_BITS + 1) begin : g_bad_width
    $error("sdm: C_BITS must be at least M_BITS + 1");
  end

  logic signed [C_BITS-1:0] fb;      // V as +-2^(m-1)
  logic signed [C_BITS:0]   y_wide;  // one guard bit for the overflow check
  logic signed [C_BITS-1:0] y_next;

  // Quantizer: the register's MSB, inverted so that 1 stands for +1.
  assign v = ~y[C_BITS-1];

  always_comb begin
    fb     = {{(C_BITS - M_BITS){~v}}, 1'b1, {(M_BITS - 1){1'b0}}};
    y_wide = (C_BITS+1)'(y) + (C_BITS+1)'(u) - (C_BITS+1)'(fb);
    y_next = y_wide[C_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= y_next;
  end

  // The register must not wrap: that would break the loop's stability.
  always_ff @(posedge clk) begin
    a_no_overflow : assert (y_wide[C_BITS] == y_wide[C_BITS-1])
      else $error("sdm: integrator overflow");
  end

endmodule
