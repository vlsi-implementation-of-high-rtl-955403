// shift_sel_mux: k-bit 4-to-1 operand multiplexer (M1 for the SC path, M2
// for the SS path).
//
// The SS and SC registers hold the carry-save adder output before the
// division by two of the iteration; the division is applied here, one cycle
// later, so it costs no logic on the adder's path. Inputs:
//   SEL_SH1  register >> 1   (last iteration not skipped, S[i+1])
//   SEL_SH2  register >> 2   (last iteration followed by a skip, S[i+2]);
//            'inj' sets bit 0, restoring the value of the two dropped low
//            bits when both were 1 (bit 0 is known to be 0 then)
//   SEL_NOSH register        (carry-save to binary conversion)
//   SEL_LOAD load operand    (N^ into M1, B^ into M2, for D^ = B^ + N^)
// Combinational. The select codes are generated by the controller. The
// >>1 / >>2 taps and the N^ / B^ load inputs follow the published M1/M2; the
// unshifted input for the conversion passes, the select encoding and the
// bit-0 correction are this design's choices.
module shift_sel_mux
  import scs_mm_pkg::*;
#(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] reg_val,
  input  logic [W-1:0] load_val,
  input  opsel_e       sel,
  input  logic         inj,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      SEL_SH1:  y = reg_val >> 1;
      SEL_SH2:  y = (reg_val >> 2) | W'(inj);
      SEL_NOSH: y = reg_val;
      SEL_LOAD: y = load_val;
      default:  y = reg_val;
    endcase
  end
endmodule
