// tb_sdm: self-checking testbench of the first-order sigma-delta modulator.
//
// Two instances are checked cycle by cycle against a behavioural model of
// Y_n = Y_{n-1} + U_n - V_{n-1}, V = (Y >= 0): the default one (m = 15,
// c = 16) and a narrow one with a wider register (m = 8, c = 10) that
// exercises the sign-extended feedback. Random, constant and full-scale
// inputs are applied. For constant inputs the number of ones over a window
// must match the input's density (1 + U / 2^(m-1)) / 2 to within the
// modulator's bounded error. The latency check verifies that a sample shows
// in Y one clock after it is applied.
module tb_sdm;

  localparam int M1 = 15, C1 = 16;
  localparam int M2 = 8,  C2 = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [M1-1:0] u1;
  logic signed [M2-1:0] u2;
  logic v1, v2;
  logic signed [C1-1:0] y1;
  logic signed [C2-1:0] y2;

  int checks = 0;
  int failures = 0;

  sdm #(.M_BITS(M1), .C_BITS(C1)) dut1 (.clk(clk), .rst_n(rst_n), .u(u1), .v(v1), .y(y1));
  sdm #(.M_BITS(M2), .C_BITS(C2)) dut2 (.clk(clk), .rst_n(rst_n), .u(u2), .v(v2), .y(y2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference models
  longint ym1, ym2;
  function automatic longint step(longint y, longint u, int m);
    longint fb = (y >= 0) ? (longint'(1) <<< (m - 1)) : -(longint'(1) <<< (m - 1));
    return y + u - fb;
  endfunction

  task automatic check(string what);
    checks++;
    if (longint'(y1) != ym1 || v1 != (ym1 >= 0) || longint'(y2) != ym2 || v2 != (ym2 >= 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: y1=%0d exp %0d v1=%0b  y2=%0d exp %0d v2=%0b",
                 what, y1, ym1, v1, y2, ym2, v2);
    end
  endtask

  // One clock with the given inputs, model updated alongside. Called at a
  // falling edge; returns at the next one.
  task automatic cycle(longint a, longint b);
    u1 = M1'(a);
    u2 = M2'(b);
    @(posedge clk);
    ym1 = step(ym1, a, M1);
    ym2 = step(ym2, b, M2);
    @(negedge clk);
    check("cycle");
  endtask

  // Constant input for n cycles; the count of ones must track the input.
  task automatic density(longint a, longint b, int n);
    int ones1 = 0, ones2 = 0;
    real e1, e2;
    for (int i = 0; i < n; i++) begin
      cycle(a, b);
      ones1 += int'(v1);
      ones2 += int'(v2);
    end
    e1 = n * (1.0 + real'(a) / real'(longint'(1) <<< (M1 - 1))) / 2.0;
    e2 = n * (1.0 + real'(b) / real'(longint'(1) <<< (M2 - 1))) / 2.0;
    checks++;
    if ((real'(ones1) - e1) > 2.5 || (e1 - real'(ones1)) > 2.5 ||
        (real'(ones2) - e2) > 2.5 || (e2 - real'(ones2)) > 2.5) begin
      failures++;
      $display("FAIL density u1=%0d ones=%0d exp %f, u2=%0d ones=%0d exp %f",
               a, ones1, e1, b, ones2, e2);
    end
  endtask

  initial begin
    u1 = '0;
    u2 = '0;
    ym1 = 0;
    ym2 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check("reset");

    // Latency: the sample applied before an edge is in Y right after it.
    u1 = 15'sd1234;
    u2 = 8'sd55;
    @(posedge clk);
    #1;
    checks++;
    if (y1 != 16'sd1234 - 16'sd16384 || y2 != 10'sd55 - 10'sd128) begin
      failures++;
      $display("FAIL latency y1=%0d y2=%0d", y1, y2);
    end
    ym1 = step(ym1, 1234, M1);
    ym2 = step(ym2, 55, M2);
    @(negedge clk);

    // Random inputs, full range.
    for (int i = 0; i < 20000; i++) begin
      cycle(longint'($signed(M1'($urandom))), longint'($signed(M2'($urandom))));
    end

    // Constant inputs, including both full-scale ends.
    density(0, 0, 4096);
    density(8192, 64, 4096);
    density(-12345, -100, 4096);
    density(16383, 127, 4096);
    density(-16384, -128, 4096);
    density(3, -3, 4096);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
