// tb_rns_sign_detector: end-to-end test of the sign detector at its default
// size, n = 8, moduli {255, 256, 257}, dynamic range M = 16776960.
//
// 1. The worked example: X_s = -440, i.e. X = 16776520 with residues
//    {70, 72, 74}. The rotated operands must be x1_hat = 0x23 and
//    x3_hat' = 0x25, the end-around carry Co = 0 and the sign 1.
// 2. Every X in [0, M): the residues are computed with the % operator and the
//    expected sign is (X >= M/2). This covers every valid input code.
// While sweeping, the test counts how often each mechanism of the datapath is
// exercised and fails if one never is: Co = 0 and Co = 1, x3 = 2^n (the top
// residue bit folded in by the OR), x3,0 = 1 filling C' bit 0, the carry
// into the MSB from the group generate and from Co through the group
// propagate, and both output values.
module tb_rns_sign_detector;

  localparam int unsigned N  = 8;
  localparam longint unsigned M1 = (1 << N) - 1;
  localparam longint unsigned M2 = (1 << N);
  localparam longint unsigned M3 = (1 << N) + 1;
  localparam longint unsigned M  = M1 * M2 * M3;

  logic [N-1:0] x1, x2;
  logic [N:0]   x3;
  logic         x_msb;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  longint n_co0 = 0, n_co1 = 0, n_x3_top = 0, n_x30 = 0;
  longint n_carry_gen = 0, n_carry_co = 0, n_pos = 0, n_neg = 0;

  rns_sign_detector dut (.x1(x1), .x2(x2), .x3(x3), .x_msb(x_msb));

  task automatic expect_bit(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, want);
    end
  endtask

  task automatic expect_vec(input string what, input logic [N-1:0] got, input logic [N-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  longint unsigned x;
  int unsigned bad_sweep = 0;

  initial begin

    // worked example
    x1 = 8'd70; x2 = 8'd72; x3 = 9'd74;
    #1;
    expect_vec("example x1_hat", dut.x1_hat, 8'b0010_0011);
    expect_vec("example x3_hat'", dut.x3_hat, 8'b0010_0101);
    expect_bit("example Co", dut.co, 1'b0);
    expect_bit("example sign", x_msb, 1'b1);
    x = 64'd16776520;
    expect_bit("example residues", (x % M1 == 70) && (x % M2 == 72) && (x % M3 == 74), 1'b1);

    // exhaustive sweep over the dynamic range
    for (x = 0; x < M; x++) begin
      x1 = N'(x % M1);
      x2 = N'(x % M2);
      x3 = (N+1)'(x % M3);
      #1;
      checks++;
      if (x_msb !== (x >= M / 2)) begin
        failures++;
        bad_sweep++;
        if (bad_sweep < 10) $display("FAIL X=%0d {%0d,%0d,%0d}: sign %b", x, x1, x2, x3, x_msb);
      end
      if (dut.co) n_co1++; else n_co0++;
      if (x3[N]) n_x3_top++;
      if (x3[0]) n_x30++;
      if (dut.u_mppa.grp.g) n_carry_gen++;
      else if (dut.u_mppa.grp.p && dut.co) n_carry_co++;
      if (x_msb) n_neg++; else n_pos++;
    end

    $display("swept X = 0 .. %0d", M - 1);
    $display("Co=0: %0d  Co=1: %0d  x3=2^n: %0d  x3,0=1: %0d", n_co0, n_co1, n_x3_top, n_x30);
    $display("MSB carry by generate: %0d  by Co through propagate: %0d", n_carry_gen, n_carry_co);
    $display("positive: %0d  negative: %0d", n_pos, n_neg);
    expect_bit("Co=0 seen", n_co0 > 0, 1'b1);
    expect_bit("Co=1 seen", n_co1 > 0, 1'b1);
    expect_bit("x3=2^n seen", n_x3_top > 0, 1'b1);
    expect_bit("x3,0=1 seen", n_x30 > 0, 1'b1);
    expect_bit("MSB carry by generate seen", n_carry_gen > 0, 1'b1);
    expect_bit("MSB carry by Co seen", n_carry_co > 0, 1'b1);
    expect_bit("half of the range positive", n_pos == M / 2, 1'b1);
    expect_bit("half of the range negative", n_neg == M / 2, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
