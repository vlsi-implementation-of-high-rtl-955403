// a_shift_reg: multiplier operand register A.
//
// Loaded with {A, 1'b0} at the start of a multiplication, so that in
// iteration i (starting at i = -1) bit j of the register is A_{i+j}. Each
// iteration it shifts right by one bit, or by two when the skip detector
// skips the next iteration. Outputs A_{i+1} and A_{i+2} to the skip detector.
// Timing: load and shift take effect at the rising clock edge; load wins.
// The register and its two outputs are as published; the shift-by-one-or-two
// structure and the {A, 0} load are this design's way of providing them.
module a_shift_reg #(
  parameter int unsigned AW = 1025   // width of A (k+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] a_in,
  input  logic          shift,   // advance one iteration
  input  logic          skip,    // advance one more (skipped iteration)
  output logic          a_i1,    // A_{i+1}
  output logic          a_i2     // A_{i+2}
);
  logic [AW:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      r <= '0;
    else if (load)   r <= {a_in, 1'b0};
    else if (shift)  r <= skip ? (r >> 2) : (r >> 1);
  end

  assign a_i1 = r[1];
  assign a_i2 = r[2];
endmodule
