// tb_sng: self-checking testbench of the SNG comparator.
//
// A 4-bit instance is checked exhaustively and the default 15-bit one with
// boundary and random operands: s must be 1 exactly when r < b (unsigned).
module tb_sng;

  logic [3:0]  r4, b4;
  logic [14:0] r15, b15;
  logic s4, s15;

  int checks = 0;
  int failures = 0;

  sng #(.K_BITS(4)) dut4  (.r(r4),  .b(b4),  .s(s4));
  sng               dut15 (.r(r15), .b(b15), .s(s15));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check15(int unsigned rr, int unsigned bb);
    r15 = 15'(rr);
    b15 = 15'(bb);
    #1;
    checks++;
    if (s15 != (rr < bb)) begin
      failures++;
      if (failures < 10) $display("FAIL k=15 r=%0d b=%0d s=%0b", rr, bb, s15);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        r4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (s4 != (i < j)) begin
          failures++;
          if (failures < 10) $display("FAIL k=4 r=%0d b=%0d s=%0b", i, j, s4);
        end
      end
    end
    check15(0, 0);
    check15(0, 1);
    check15(32767, 32767);
    check15(32766, 32767);
    check15(16384, 16383);
    check15(16383, 16384);
    for (int i = 0; i < 5000; i++) begin
      automatic int unsigned rr = $urandom % 32768;
      check15(rr, (i % 3 == 0) ? rr : ($urandom % 32768));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
