// cfa: configurable full adder, one bit slice of the one-level configurable
// carry-save adder (CCSA).
//
// With alpha = 0 (CSA_1F) the cell is a plain full adder on (a, b, x):
//   s = a ^ b ^ x,  c = maj(a, b, x).
// With alpha = 1 (CSA_2H) the cell acts as two half adders in series: the
// first half adder adds a and b, its carry (ha_c) is handed to the next more
// significant cell, and the second half adder adds the first sum to the
// carry received from the less significant cell (ha_cin):
//   s = a ^ b ^ ha_cin,  c = (a ^ b) & ha_cin.
// So one row of these cells performs either one three-input carry-save
// addition or two serial two-input carry-save additions in a single clock.
// The cell is purely combinational. The structure (shared a^b, a mux on the
// third input steered by alpha, carry logic gated by alpha) follows the
// published CFA; the third input is taken true here rather than inverted.
module cfa (
  input  logic a,       // SC-side operand bit (from M1)
  input  logic b,       // SS-side operand bit (from M2)
  input  logic x,       // third operand bit (from SM3), used when alpha = 0
  input  logic ha_cin,  // first-half-adder carry of the less significant cell
  input  logic alpha,   // 0: full adder, 1: two serial half adders
  output logic s,       // sum bit (same weight)
  output logic c,       // carry bit (next weight)
  output logic ha_c     // first-half-adder carry, to the more significant cell
);
  logic p;   // a ^ b
  logic t;   // third input chosen by alpha

  always_comb begin
    p    = a ^ b;
    ha_c = a & b;
    t    = alpha ? ha_cin : x;
    s    = p ^ t;
    c    = (p & t) | (~alpha & ha_c);
  end
endmodule
