// tb_sc_fir: self-checking testbench of the stochastic FIR core.
//
// Drives the default 5-tap filter and a 7-tap one with random input bits
// and random coefficient bits. A model keeps its own copy of the last M
// input bits and counts the taps where input and coefficient agree (the
// XNOR products); z must equal that count on every clock. Runs with all
// coefficient bits at 1 and at 0 make z reach both ends, 0 and M.
module tb_sc_fir;

  localparam int M1 = 5;
  localparam int M2 = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic v;
  logic w1 [M1];
  logic w2 [M2];
  logic [2:0] z1;
  logic [2:0] z2;

  int checks = 0;
  int failures = 0;

  sc_fir                 dut1 (.clk(clk), .rst_n(rst_n), .v(v), .w_bit(w1), .z(z1));
  sc_fir #(.TAPS(M2))    dut2 (.clk(clk), .rst_n(rst_n), .v(v), .w_bit(w2), .z(z2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic hist [M2];  // hist[i] = V_{n-i}, model of the delay line
  int hits_min = 0, hits_max = 0;

  task automatic check();
    int e1 = 0, e2 = 0;
    hist[0] = v;
    for (int i = 0; i < M1; i++) e1 += int'(w1[i] == hist[i]);
    for (int i = 0; i < M2; i++) e2 += int'(w2[i] == hist[i]);
    checks++;
    if (int'(z1) != e1 || int'(z2) != e2) begin
      failures++;
      if (failures < 10) $display("FAIL z1=%0d exp %0d z2=%0d exp %0d", z1, e1, z2, e2);
    end
    if (z1 == 3'd0) hits_min++;
    if (z1 == 3'(M1)) hits_max++;
  endtask

  task automatic clock();
    @(posedge clk);
    for (int i = M2 - 1; i > 0; i--) hist[i] = hist[i-1];
    @(negedge clk);
  endtask

  initial begin
    v = 1'b0;
    foreach (w1[i]) w1[i] = 1'b0;
    foreach (w2[i]) w2[i] = 1'b0;
    foreach (hist[i]) hist[i] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      v = 1'($urandom);
      if (n % 1000 < 10) begin
        // all-ones input and coefficients, then input all ones against zero
        v = 1'b1;
        foreach (w1[i]) w1[i] = (n % 1000 < 8);
        foreach (w2[i]) w2[i] = (n % 1000 < 8);
      end else begin
        foreach (w1[i]) w1[i] = 1'($urandom);
        foreach (w2[i]) w2[i] = 1'($urandom);
      end
      #1;
      check();
      clock();
    end
    checks++;
    if (hits_min == 0 || hits_max == 0) begin
      failures++;
      $display("FAIL z never reached 0 (%0d) or M (%0d)", hits_min, hits_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
