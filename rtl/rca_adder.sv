// rca_adder: W-bit ripple-carry adder, sum = (a + b) mod 2^W.
//
// A chain of full adders, one per bit, the carry of bit i feeding bit i+1.
// This is the "Adder" box of the multiplier tree: the carries of the
// vertical-and-crosswise scheme are said to propagate as in a ripple-carry
// adder, so that is the structure used here. There is no carry-out: every
// instance in the multiplier tree is sized so that its sum cannot exceed W
// bits, and the accumulator of the MAC wraps by design.
//
// Interface: a, b (W bits) in, sum (W bits) out. Purely combinational.
module rca_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  // carry[i] is the carry into bit i; the carry out of the top bit is dropped.
  logic [W-1:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ carry[i];
    if (i + 1 < W) begin : g_carry
      assign carry[i+1] = (a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]));
    end
  end
endmodule
