// mm_top: top level holding the two multipliers side by side.
//
//   u_mm   scs_mm_new: k-bit Montgomery modular multiplier,
//          S = A * B * 2^-(k+2) mod N^ (see scs_mm_new for the protocol)
//   u_mul  normal16x16: combinational 16 x 16 unsigned multiplier
// The two units are independent and each has its own ports; putting them
// side by side is this design's choice.
module mm_top #(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  // Montgomery multiplier
  input  logic         mm_start,
  input  logic [K:0]   mm_a,
  input  logic [K:0]   mm_b,
  input  logic [K-1:0] mm_n,
  output logic         mm_busy,
  output logic         mm_done,
  output logic [K:0]   mm_s,
  // 16 x 16 multiplier
  input  logic [15:0]  mul_a,
  input  logic [15:0]  mul_b,
  output logic [31:0]  mul_c
);
  scs_mm_new #(.K(K)) u_mm (
    .clk(clk), .rst_n(rst_n), .start(mm_start),
    .a_in(mm_a), .b_in(mm_b), .n_in(mm_n),
    .busy(mm_busy), .done(mm_done), .result(mm_s)
  );

  normal16x16 u_mul (.a(mul_a), .b(mul_b), .c(mul_c));
endmodule
