// tb_vedic_mul4x4: self-checking test of the 4x4 Vedic multiplier.
//
// Applies every one of the 256 operand pairs and
// compares q with the product computed by the simulator's own * operator on
// wider integers. The multiplier is combinational: each pair is held for one
// time unit before q is sampled. A watchdog ends the run as a failure if it
// has not finished in time.
`timescale 1ns/1ps
module tb_vedic_mul4x4;
  localparam int unsigned N = 4;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;
  int checks = 0;
  int failures = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .q(q));

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
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        apply(N'(i), N'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
