// vedic_mul16x16: 16x16-bit unsigned multiplier built from four 8x8 blocks.
//
// The operands are split into halves, aH:aL and bH:bL (8 bits each). Four
// 8x8 blocks form the partial products
//   q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
// and three ripple-carry adders combine them:
//   s1 = {q3, 8'b0} + q2                     (24 bits)
//   s2 = q1 + q0[15:8]                       (16 bits)
//   Q[31:8] = s1 + s2,  Q[7:0] = q0[7:0]
// The low 8 bits of q0 are already final and bypass the adders. Sub-block
// order, operand halves, zero padding and the three adders follow the
// document's block diagram of the 16x16 multiplier; the adders being ripple-
// carry is this design's reading of the text. None can overflow its width
// (s1 <= 255*255*257 < 2^24).
//
// Interface: a, b (16 bits) in, q = a*b (32 bits) out. Purely
// combinational, no clock.
module vedic_mul16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q
);
  localparam int unsigned H = 8;  // half width

  logic [2*H-1:0] q0, q1, q2, q3;  // partial products of the four sub-blocks
  logic [3*H-1:0] s1;              // {q3, 0} + q2
  logic [2*H-1:0] s2;              // q1 + upper half of q0
  logic [3*H-1:0] s3;              // s1 + s2 = upper bits of q

  vedic_mul8x8 u_q0 (.a(a[H-1:0]),   .b(b[H-1:0]),   .q(q0));
  vedic_mul8x8 u_q1 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .q(q1));
  vedic_mul8x8 u_q2 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .q(q2));
  vedic_mul8x8 u_q3 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .q(q3));

  rca_adder #(.W(3*H)) u_add1 (.a({q3, {H{1'b0}}}),   .b({{H{1'b0}}, q2}),  .sum(s1));
  rca_adder #(.W(2*H)) u_add2 (.a(q1),                .b({{H{1'b0}}, q0[2*H-1:H]}), .sum(s2));
  rca_adder #(.W(3*H)) u_add3 (.a(s1),                .b({{H{1'b0}}, s2}),  .sum(s3));

  assign q = {s3, q0[H-1:0]};
endmodule
