// vedic_mul2x2: 2x2-bit unsigned multiplier, the leaf of the Vedic
// (Urdhva Tiryakbhyam, "vertically and crosswise") multiplier tree.
//
// The product is formed column by column:
//   bit 0  vertical:  a0.b0
//   bit 1  crosswise: a1.b0 + a0.b1, sum bit kept, carry passed on
//   bit 2  vertical:  a1.b1 plus the crosswise carry
//   bit 3  carry of bit 2
// Four AND gates and two half adders, as the sutra prescribes for two-bit
// operands. The scheme is the document's; the gate-level form is the
// natural reading of it.
//
// Interface: a, b (2 bits) in, q = a*b (4 bits) out. Purely combinational,
// no clock.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p_lo, p_x1, p_x2, p_hi;  // partial products
  logic c1;                      // carry out of the crosswise column

  always_comb begin
    p_lo = a[0] & b[0];
    p_x1 = a[1] & b[0];
    p_x2 = a[0] & b[1];
    p_hi = a[1] & b[1];

    q[0] = p_lo;
    q[1] = p_x1 ^ p_x2;
    c1   = p_x1 & p_x2;
    q[2] = p_hi ^ c1;
    q[3] = p_hi & c1;
  end
endmodule
