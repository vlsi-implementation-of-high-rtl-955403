// ccsa: W-bit one-level configurable carry-save adder.
//
// A row of W cfa cells. In mode CSA_1F it computes one carry-save addition
// of three W-bit operands, 1F_CSA(a, b, x); in mode CSA_2H it computes two
// serial half-adder carry-save additions of two operands, 2H_CSA(a, b), with
// x ignored. In both modes ss + sc equals the arithmetic sum of the inputs,
// provided that sum fits in W bits (the carry out of the top cell is
// dropped; the surrounding datapath is sized so it is always zero).
// sc is the carry vector already moved to its own weight, so sc[0] = 0.
// Combinational, no clock. The row of configurable cells and its two modes
// follow the published one-level CCSA; the k+6 width is this design's sizing.
module ccsa
  import scs_mm_pkg::*;
#(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] a,     // from M1 (SC path or N^)
  input  logic [W-1:0] b,     // from M2 (SS path or B^)
  input  logic [W-1:0] x,     // from SM3
  input  csa_mode_e    mode,  // alpha
  output logic [W-1:0] ss,    // sum vector
  output logic [W-1:0] sc     // carry vector, weight-aligned
);
  logic [W-1:0] c;      // cell carries, weight j+1
  logic [W:0]   hac;    // first-half-adder carries, hac[j+1] from cell j

  assign hac[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_cell
    cfa u_cfa (
      .a      (a[j]),
      .b      (b[j]),
      .x      (x[j]),
      .ha_cin (hac[j]),
      .alpha  (mode == CSA_2H),
      .s      (ss[j]),
      .c      (c[j]),
      .ha_c   (hac[j+1])
    );
  end

  // The top cell's carries leave the W-bit range; the datapath keeps them 0.
  assign sc = {c[W-2:0], 1'b0};
endmodule
