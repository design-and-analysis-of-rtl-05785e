// tb_sd_carry_gen: self-checking test of the carry generator. The expected
// end-around carry is Co = (a + b >= 2^n - 1), worked out with integer
// arithmetic. Every operand pair is tried at the default n = 8 and at n = 5
// (an odd width, where the prefix tree has an unpaired node), and 20000
// random pairs at n = 12. The test also counts pairs whose sum is exactly
// 2^n - 1, the case the group propagate term alone must catch.
module tb_sd_carry_gen;

  logic [7:0]  a8, b8;
  logic [4:0]  a5, b5;
  logic [11:0] a12, b12;
  logic        co8, co5, co12;

  int checks = 0;
  int failures = 0;
  int all_ones = 0;

  sd_carry_gen dut8 (.a(a8), .b(b8), .co(co8));
  sd_carry_gen #(.N(5))  dut5  (.a(a5),  .b(b5),  .co(co5));
  sd_carry_gen #(.N(12)) dut12 (.a(a12), .b(b12), .co(co12));

  task automatic check(input int n, input int unsigned a, input int unsigned b,
                       input logic co);
    bit expected = (a + b) >= ((1 << n) - 1);
    if ((a + b) == (1 << n) - 1) all_ones++;
    checks++;
    if (co !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d a=%0d b=%0d co=%b expected %b", n, a, b, co, expected);
    end
  endtask

  initial begin
    a5 = '0; b5 = '0; a12 = '0; b12 = '0;
    for (int i = 0; i < (1 << 16); i++) begin
      {a8, b8} = 16'(i);
      #1 check(8, int'(a8), int'(b8), co8);
    end
    for (int i = 0; i < (1 << 10); i++) begin
      {a5, b5} = 10'(i);
      #1 check(5, int'(a5), int'(b5), co5);
    end
    for (int i = 0; i < 20000; i++) begin
      a12 = 12'($urandom);
      // every fourth pair lands exactly on or next to the all-ones sum
      b12 = (i % 4 == 0) ? 12'(12'hfff - a12 + 12'($urandom_range(0, 2)) - 12'd1)
                         : 12'($urandom);
      #1 check(12, int'(a12), int'(b12), co12);
    end
    if (all_ones == 0) begin
      failures++;
      $display("FAIL all-ones sum never applied");
    end
    $display("all-ones sums applied: %0d", all_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
