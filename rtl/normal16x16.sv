// normal16x16: 16 x 16 bit unsigned array multiplier, c = a * b.
//
// An array of partial-product rows: row j is a AND-ed with b[j] and shifted
// left by j, and the rows are accumulated one after another by ripple
// adders, p1 = pp0 + pp1, p2 = p1 + pp2, ..., p15 = c. This is the plain
// combinational structure suggested by the triangular cell array of the
// multiplier's layout; the row adders are this design's choice.
module normal16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c
);
  logic [31:0] pp [16];   // partial products
  logic [31:0] p  [16];   // running sums, p[15] is the product

  always_comb begin
    for (int j = 0; j < 16; j++)
      pp[j] = b[j] ? (32'(a) << j) : 32'd0;
    p[0] = pp[0];
    for (int j = 1; j < 16; j++)
      p[j] = p[j-1] + pp[j];
  end

  assign c = p[15];
endmodule
