// tb_sng_bank: self-checking testbench of the shared-LFSR coefficient SNGs.
//
// Runs the default bank (k = 15, M = 5, s = 1) for one whole LFSR period
// of 2^15 clocks. Each clock, every tap's bit is compared with a model that
// rotates the LFSR word right by i * s bits and compares it with the tap's
// coefficient word. Because the LFSR visits every value once per period
// and a rotation is a bijection, tap i must emit exactly w_bin[i] ones per
// period, which is checked too. Finally, two taps with the same
// coefficient must not produce identical streams (the maximal correlation
// that a plain shared LFSR would give). A second, small bank (k = 8,
// M = 4, s = 3) is checked bit by bit over two of its periods and must
// also emit exactly W ones per tap per period.
module tb_sng_bank;

  localparam int K = 15;
  localparam int M = 5;
  localparam int S = 1;
  localparam int N = 1 << K;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [K-1:0] w_bin [M];
  logic         w_bit [M];
  logic [K-1:0] r_word;

  int checks = 0;
  int failures = 0;

  sng_bank dut (.clk(clk), .rst_n(rst_n), .w_bin(w_bin), .w_bit(w_bit), .r_word(r_word));

  localparam int K2 = 8, M2 = 4, S2 = 3;
  logic [K2-1:0] w_bin2 [M2];
  logic          w_bit2 [M2];
  logic [K2-1:0] r_word2;
  int            ones2 [M2];

  sng_bank #(.K_BITS(K2), .TAPS(M2), .SHIFT(S2), .SEED(8'hA5)) dut2 (
    .clk(clk), .rst_n(rst_n), .w_bin(w_bin2), .w_bit(w_bit2), .r_word(r_word2)
  );

  function automatic logic [K2-1:0] rotr2(logic [K2-1:0] x, int n);
    logic [K2-1:0] y = x;
    for (int i = 0; i < n; i++) y = {y[0], y[K2-1:1]};
    return y;
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] rotr(logic [K-1:0] x, int n);
    logic [K-1:0] y = x;
    for (int i = 0; i < n; i++) y = {y[0], y[K-1:1]};
    return y;
  endfunction

  int ones [M];
  int same01 = 0;   // clocks on which taps 1 and 3 agree (equal weights)

  initial begin
    // Bipolar weights 0.7 0.6 0.9 0.6 0.7 coded as (w + 1) * 2^(k-1)
    w_bin[0] = 15'd27853;
    w_bin[1] = 15'd26214;
    w_bin[2] = 15'd31130;
    w_bin[3] = 15'd26214;
    w_bin[4] = 15'd27853;
    foreach (ones[i]) ones[i] = 0;
    foreach (ones2[i]) ones2[i] = 0;
    w_bin2[0] = 8'd200;
    w_bin2[1] = 8'd17;
    w_bin2[2] = 8'd128;
    w_bin2[3] = 8'd255;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (r_word != 15'd1) begin
      failures++;
      $display("FAIL LFSR seed %h", r_word);
    end
    for (int n = 0; n < N; n++) begin
      for (int i = 0; i < M; i++) begin
        automatic logic e = (rotr(r_word, i * S) < w_bin[i]);
        checks++;
        if (w_bit[i] != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d tap %0d bit %0b exp %0b", n, i, w_bit[i], e);
        end
        ones[i] += int'(w_bit[i]);
      end
      if (w_bit[1] == w_bit[3]) same01++;
      for (int i = 0; i < M2; i++) begin
        automatic logic e2 = (rotr2(r_word2, i * S2) < w_bin2[i]);
        checks++;
        if (w_bit2[i] != e2) begin
          failures++;
          if (failures < 10) $display("FAIL small bank n=%0d tap %0d bit %0b exp %0b", n, i, w_bit2[i], e2);
        end
        if (n < 2 * (1 << K2)) ones2[i] += int'(w_bit2[i]);
      end
      @(negedge clk);
    end
    for (int i = 0; i < M; i++) begin
      checks++;
      if (ones[i] != int'(w_bin[i])) begin
        failures++;
        $display("FAIL tap %0d: %0d ones per period, expected %0d", i, ones[i], w_bin[i]);
      end
    end
    for (int i = 0; i < M2; i++) begin
      checks++;
      if (ones2[i] != 2 * int'(w_bin2[i])) begin
        failures++;
        $display("FAIL small bank tap %0d: %0d ones in two periods, expected %0d", i, ones2[i], 2 * w_bin2[i]);
      end
    end
    checks++;
    if (same01 == N) begin
      failures++;
      $display("FAIL taps 1 and 3 are maximally correlated");
    end
    checks++;
    if (r_word != 15'd1) begin
      failures++;
      $display("FAIL LFSR not back at its seed after 2^k clocks: %h", r_word);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
