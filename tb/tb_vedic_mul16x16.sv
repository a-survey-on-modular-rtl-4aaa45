// tb_vedic_mul16x16: self-checking test of the 16x16 Vedic multiplier.
//
// Applies the corner operands (0, 1, all ones, single bits) and 20000 random pairs and
// compares q with the product computed by the simulator's own * operator on
// wider integers. The multiplier is combinational: each pair is held for one
// time unit before q is sampled. A watchdog ends the run as a failure if it
// has not finished in time.
`timescale 1ns/1ps
module tb_vedic_mul16x16;
  localparam int unsigned N = 16;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;
  int checks = 0;
  int failures = 0;

  vedic_mul16x16 dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    longint unsigned expect_q;
    a = x;
    b = y;
    #1;
    expect_q = longint'(x) * longint'(y);
    checks++;
    if (longint'(q) != expect_q) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH a=%0d b=%0d q=%0d expected %0d", x, y, q, expect_q);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corner [6];
    corner = '{'0, N'(1), '1, {1'b1, {(N-1){1'b0}}}, {1'b0, {(N-1){1'b1}}}, N'(16'hA5C3)};
    foreach (corner[i])
      foreach (corner[j])
        apply(corner[i], corner[j]);
    for (int k = 0; k < N; k++)
      for (int m = 0; m < N; m++)
        apply(N'(1) << k, N'(1) << m);
    repeat (20000) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
