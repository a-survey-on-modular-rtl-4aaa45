// tb_vedic_mac: end-to-end test of the multiply-accumulate unit, which holds
// the whole multiplier tree (16x16 -> 8x8 -> 4x4 -> 2x2 and the adders).
//
// Runs at the unit's default parameters. A reference model in the
// testbench keeps the expected accumulator as an integer reduced modulo
// 2^ACC_W. Inputs change on the falling clock edge; on every rising edge the
// model is updated and, just before the next inputs are driven, the DUT's
// acc is compared with it. The product output is compared right after each
// input change (it is combinational). The phases are:
//   1. directed: one accumulate, a hold, a clear, a clear-with-load; the
//      acc value is checked one cycle after the operation and found
//      unchanged before the edge (one-cycle latency, one MAC per cycle);
//   2. dot products of 16-element random vectors, each started with clr+en;
//   3. 3000 cycles with random en, clr and operands;
//   4. 300 full-scale products in a row, driving the 40-bit accumulator
//      past 2^40 so that it wraps;
//   5. an asynchronous reset in mid-sum.
// Each mechanism (accumulate, hold, clear, clear-with-load, wrap, reset) is
// counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_vedic_mac;
  localparam int unsigned ACC_W = 40;
  localparam longint unsigned ACC_MASK = (64'd1 << ACC_W) - 1;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             en, clr;
  logic [15:0]      a, b;
  logic [31:0]      product;
  logic [ACC_W-1:0] acc;

  int checks = 0;
  int failures = 0;
  int n_acc = 0, n_hold = 0, n_clear = 0, n_load = 0, n_wrap = 0, n_reset = 0;
  longint unsigned model = 0;

  vedic_mac dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint unsigned got,
                       input longint unsigned expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH %s: got %0h expected %0h at %0t", what, got, expect_v, $time);
    end
  endtask

  // Drive one operation on the falling edge, check the product, then let the
  // rising edge happen and update the model.
  task automatic op(input logic e, input logic c, input logic [15:0] x,
                    input logic [15:0] y);
    longint unsigned p, s;
    @(negedge clk);
    check("acc", longint'(acc), model);
    en = e; clr = c; a = x; b = y;
    #1;
    p = longint'(x) * longint'(y);
    check("product", longint'(product), p);
    check("acc before edge", longint'(acc), model);
    if (c && e)      begin s = p;                n_load++;  end
    else if (c)      begin s = 0;                n_clear++; end
    else if (e)      begin s = model + p;        n_acc++;   end
    else             begin s = model;            n_hold++;  end
    if (!c && e && s > ACC_MASK) n_wrap++;
    @(posedge clk);
    model = s & ACC_MASK;
  endtask

  // One hold cycle, so that acc can be read against a known value right
  // after the edge without another operation slipping in.
  task automatic idle();
    op(0, 0, 16'd0, 16'd0);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned dot;
    logic [15:0] va, vb;
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 check("acc after reset", longint'(acc), 0);
    rst_n = 1'b1;

    // 1. directed
    op(1, 0, 16'd1234, 16'd5678);
    op(0, 0, 16'd9999, 16'd9999);
    op(1, 0, 16'hFFFF, 16'hFFFF);
    op(0, 1, 16'd3, 16'd3);
    op(1, 1, 16'd300, 16'd7);
    op(1, 0, 16'd2, 16'd50);
    idle();
    check("directed result", longint'(acc), 64'd2200);

    // 2. dot products
    for (int v = 0; v < 20; v++) begin
      dot = 0;
      for (int i = 0; i < 16; i++) begin
        va = 16'($urandom); vb = 16'($urandom);
        dot += longint'(va) * longint'(vb);
        op(1, i == 0, va, vb);
      end
      idle();
      check("dot product", longint'(acc), dot & ACC_MASK);
    end

    // 3. random control and operands
    repeat (3000) begin
      int r;
      r = $urandom_range(0, 15);
      op(r < 11, r == 0 || r == 15, 16'($urandom), 16'($urandom));
    end

    // 4. full-scale products until the accumulator wraps
    op(1, 1, 16'hFFFF, 16'hFFFF);
    repeat (300) op(1, 0, 16'hFFFF, 16'hFFFF);

    // 5. asynchronous reset in mid-sum
    op(1, 0, 16'd40000, 16'd40000);
    idle();
    #1 rst_n = 1'b0;
    #1 check("acc in reset", longint'(acc), 0);
    n_reset++;
    model = 0;
    #1 rst_n = 1'b1;
    op(1, 0, 16'd12, 16'd12);
    idle();
    check("acc after reset", longint'(acc), 144);

    $display("mechanisms: accumulate=%0d hold=%0d clear=%0d clear_load=%0d wrap=%0d reset=%0d",
             n_acc, n_hold, n_clear, n_load, n_wrap, n_reset);
    if (n_acc == 0 || n_hold == 0 || n_clear == 0 || n_load == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
