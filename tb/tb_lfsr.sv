// tb_lfsr: self-checking testbench of the extended LFSR.
//
// The default 15-bit instance and a 4-bit one are stepped through a whole
// period. Every step is compared with a next-state model written from the
// polynomials x^15 + x^14 + 1 and x^4 + x^3 + 1, every value of
// 0 .. 2^k - 1 must appear exactly once, and the register must be back at
// its seed after exactly 2^k clocks (the sequence length N = 2^k).
module tb_lfsr;

  localparam int K1 = 15;
  localparam int K2 = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [K1-1:0] r1;
  logic [K2-1:0] r2;

  int checks = 0;
  int failures = 0;

  lfsr #(.K_BITS(K1), .SEED(15'h1234)) dut1 (.clk(clk), .rst_n(rst_n), .r(r1));
  lfsr #(.K_BITS(K2), .SEED(4'h9))     dut2 (.clk(clk), .rst_n(rst_n), .r(r2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K1-1:0] next1(logic [K1-1:0] r);
    logic fb = r[14] ^ r[13];
    if (r[13:0] == 14'd0) fb = ~fb;
    return {r[13:0], fb};
  endfunction

  function automatic logic [K2-1:0] next2(logic [K2-1:0] r);
    logic fb = r[3] ^ r[2];
    if (r[2:0] == 3'd0) fb = ~fb;
    return {r[2:0], fb};
  endfunction

  bit seen1 [1 << K1];
  bit seen2 [1 << K2];
  logic [K1-1:0] exp1;
  logic [K2-1:0] exp2;
  int dup1 = 0, dup2 = 0, period1 = -1, period2 = -1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (r1 != 15'h1234 || r2 != 4'h9) begin
      failures++;
      $display("FAIL seed r1=%h r2=%h", r1, r2);
    end
    rst_n = 1'b1;
    exp1 = r1;
    exp2 = r2;
    for (int n = 0; n < (1 << K1) + 4; n++) begin
      if (n < (1 << K1)) begin
        if (seen1[r1]) dup1++;
        seen1[r1] = 1'b1;
      end
      if (n < (1 << K2)) begin
        if (seen2[r2]) dup2++;
        seen2[r2] = 1'b1;
      end
      exp1 = next1(exp1);
      exp2 = next2(exp2);
      @(negedge clk);
      checks++;
      if (r1 != exp1 || r2 != exp2) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d r1=%h exp %h r2=%h exp %h", n, r1, exp1, r2, exp2);
      end
      if (period1 < 0 && r1 == 15'h1234) period1 = n + 1;
      if (period2 < 0 && r2 == 4'h9) period2 = n + 1;
    end
    checks++;
    if (dup1 != 0 || dup2 != 0) begin
      failures++;
      $display("FAIL repeated values before the period ended: %0d %0d", dup1, dup2);
    end
    for (int i = 0; i < (1 << K1); i++) begin
      checks++;
      if (!seen1[i]) begin
        failures++;
        if (failures < 10) $display("FAIL value %0d never produced (k=15)", i);
      end
    end
    for (int i = 0; i < (1 << K2); i++) begin
      checks++;
      if (!seen2[i]) begin
        failures++;
        $display("FAIL value %0d never produced (k=4)", i);
      end
    end
    checks++;
    if (period1 != (1 << K1) || period2 != (1 << K2)) begin
      failures++;
      $display("FAIL period %0d / %0d, expected %0d / %0d", period1, period2, 1 << K1, 1 << K2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
