// vedic_mac: multiply-accumulate unit around the 16x16 Vedic multiplier.
//
// Each cycle the combinational 16x16 multiplier forms p = a*b (32 bits),
// and a ripple-carry adder forms acc + p. On the clock edge the accumulator
// register takes one of three values:
//   clr=0 en=1   acc <= acc + p          accumulate
//   clr=0 en=0   acc <= acc              hold
//   clr=1 en=1   acc <= p                start a new sum with this product
//   clr=1 en=0   acc <= 0                clear
// The accumulator is ACC_W bits and wraps modulo 2^ACC_W; the default of 40
// bits gives 8 guard bits, so at least 256 full-scale products add up
// without wrapping. The product is also brought out directly, so the same
// unit serves as a plain 16x16 multiplier.
//
// The document names this unit and builds it around the multiplier, but
// gives neither its control nor the accumulator width: the four-way control
// above, the synchronous clear, the 40-bit accumulator and the active-low
// asynchronous reset are choices of this design.
//
// Timing: product is valid in the same cycle as a and b (no register); acc
// shows the result of an operation one clock after it is presented, so one
// multiply-accumulate completes every cycle.
module vedic_mac #(
  parameter int unsigned ACC_W = 40  // accumulator width, >= 32
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous, active low: acc <= 0
  input  logic             en,       // add the product this cycle
  input  logic             clr,      // discard the old sum this cycle
  input  logic [15:0]      a,        // multiplicand, unsigned
  input  logic [15:0]      b,        // multiplier, unsigned
  output logic [31:0]      product,  // a*b, combinational
  output logic [ACC_W-1:0] acc       // accumulated sum
);
  logic [ACC_W-1:0] base;     // what the product is added to
  logic [ACC_W-1:0] addend;   // the product, or zero when not accumulating
  logic [ACC_W-1:0] acc_nxt;

  vedic_mul16x16 u_mul (.a(a), .b(b), .q(product));

  always_comb begin
    base   = clr ? '0 : acc;
    addend = en ? ACC_W'(product) : '0;
  end

  rca_adder #(.W(ACC_W)) u_acc_add (.a(base), .b(addend), .sum(acc_nxt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc_nxt;
  end

  initial begin
    assert (ACC_W >= 32) else $error("vedic_mac: ACC_W must hold a full product");
  end
endmodule
