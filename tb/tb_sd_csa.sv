// tb_sd_csa: self-checking test of the n-bit carry-save adder. One instance
// at the default n = 8 gets 20000 random operand triples; a second at n = 4
// gets all 4096 triples. For every triple the test checks, from integer
// arithmetic alone, that each sum bit is the parity of the three operand bits,
// that each carry bit i is set when bits i-1 of the operands hold two or more
// ones, and that S + C = a + b + c modulo 2^n.
module tb_sd_csa;

  localparam int unsigned NB = 8;
  localparam int unsigned NS = 4;

  logic [NB-1:0] a8, b8, c8, s8;
  logic [NB-1:1] cy8;
  logic [NS-1:0] a4, b4, c4, s4;
  logic [NS-1:1] cy4;

  int checks = 0;
  int failures = 0;

  sd_csa dut8 (.a(a8), .b(b8), .c(c8), .s(s8), .carry(cy8));
  sd_csa #(.N(NS)) dut4 (.a(a4), .b(b4), .c(c4), .s(s4), .carry(cy4));

  task automatic check8();
    int unsigned total, vec_sum;
    bit ok = 1;
    for (int i = 0; i < NB; i++) begin
      int unsigned ones = 32'(a8[i]) + 32'(b8[i]) + 32'(c8[i]);
      if (s8[i] != ones[0]) ok = 0;
      if (i > 0) begin
        int unsigned below = 32'(a8[i-1]) + 32'(b8[i-1]) + 32'(c8[i-1]);
        if (cy8[i] != (below >= 2)) ok = 0;
      end
    end
    total   = (int'(a8) + int'(b8) + int'(c8)) % (1 << NB);
    vec_sum = (int'(s8) + 2 * int'(cy8)) % (1 << NB);
    if (total != vec_sum) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL n=8 a=%h b=%h c=%h s=%h carry=%h", a8, b8, c8, s8, cy8);
    end
  endtask

  task automatic check4();
    int unsigned total, vec_sum;
    bit ok = 1;
    for (int i = 0; i < NS; i++) begin
      int unsigned ones = 32'(a4[i]) + 32'(b4[i]) + 32'(c4[i]);
      if (s4[i] != ones[0]) ok = 0;
      if (i > 0) begin
        int unsigned below = 32'(a4[i-1]) + 32'(b4[i-1]) + 32'(c4[i-1]);
        if (cy4[i] != (below >= 2)) ok = 0;
      end
    end
    total   = (int'(a4) + int'(b4) + int'(c4)) % (1 << NS);
    vec_sum = (int'(s4) + 2 * int'(cy4)) % (1 << NS);
    if (total != vec_sum) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL n=4 a=%h b=%h c=%h s=%h carry=%h", a4, b4, c4, s4, cy4);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; c4 = '0;
    for (int i = 0; i < 20000; i++) begin
      a8 = NB'($urandom); b8 = NB'($urandom); c8 = NB'($urandom);
      #1 check8();
    end
    for (int i = 0; i < (1 << (3 * NS)); i++) begin
      {a4, b4, c4} = (3 * NS)'(i);
      #1 check4();
    end
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
