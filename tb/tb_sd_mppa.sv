// tb_sd_mppa: self-checking test of the modified parallel prefix adder. The
// expected output is bit n-1 of (s + c + co) mod 2^n, worked out with integer
// arithmetic. Every (s, c, co) combination is tried at the default n = 8 and
// at n = 7, and 20000 random ones at n = 16. The test counts how often the
// carry into the top bit comes from the group generate and how often only
// from Co passing through the group propagate, and fails if either never
// occurs.
module tb_sd_mppa;

  logic [7:0]  s8, c8;
  logic [6:0]  s7, c7;
  logic [15:0] s16, c16;
  logic        co8, co7, co16;
  logic        m8, m7, m16;

  int checks = 0;
  int failures = 0;
  int carry_by_gen = 0;
  int carry_by_co = 0;

  sd_mppa dut8 (.s(s8), .c(c8), .co(co8), .msb(m8));
  sd_mppa #(.N(7))  dut7  (.s(s7),  .c(c7),  .co(co7),  .msb(m7));
  sd_mppa #(.N(16)) dut16 (.s(s16), .c(c16), .co(co16), .msb(m16));

  task automatic check(input int n, input int unsigned s, input int unsigned c,
                       input int unsigned co, input logic msb);
    int unsigned low_mask = (1 << (n - 1)) - 1;
    int unsigned sum = (s + c + co) % (1 << n);
    bit expected = sum[n-1];
    if ((s & low_mask) + (c & low_mask) > low_mask) carry_by_gen++;
    else if ((s & low_mask) + (c & low_mask) + co > low_mask) carry_by_co++;
    checks++;
    if (msb !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d s=%0d c=%0d co=%0d msb=%b expected %b", n, s, c, co, msb, expected);
    end
  endtask

  initial begin
    s7 = '0; c7 = '0; co7 = 0; s16 = '0; c16 = '0; co16 = 0;
    for (int i = 0; i < (1 << 17); i++) begin
      {co8, s8, c8} = 17'(i);
      #1 check(8, int'(s8), int'(c8), int'(co8), m8);
    end
    for (int i = 0; i < (1 << 15); i++) begin
      {co7, s7, c7} = 15'(i);
      #1 check(7, int'(s7), int'(c7), int'(co7), m7);
    end
    for (int i = 0; i < 20000; i++) begin
      s16 = 16'($urandom); co16 = 1'($urandom);
      c16 = (i % 4 == 0) ? 16'(~s16) : 16'($urandom);
      #1 check(16, int'(s16), int'(c16), int'(co16), m16);
    end
    if (carry_by_gen == 0 || carry_by_co == 0) begin
      failures++;
      $display("FAIL a carry path into the MSB was never used");
    end
    $display("carry into MSB: by generate %0d, by Co through propagate %0d", carry_by_gen, carry_by_co);
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
