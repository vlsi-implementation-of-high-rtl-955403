// scs_mm_pkg: types shared by the SCS-MM-New Montgomery multiplier.
//
// Holds the select codes of the k-bit operand multiplexers M1/M2, the
// operating mode of the configurable carry-save adder (the alpha signal)
// and the states of the controller. All encodings are this design's own
// choice.
package scs_mm_pkg;

  // M1 / M2 select: which version of the SC / SS register (or which load
  // operand) enters the carry-save adder.
  typedef enum logic [1:0] {
    SEL_SH1  = 2'd0,  // register >> 1  (normal iteration, skip = 0)
    SEL_SH2  = 2'd1,  // register >> 2  (previous iteration was skipped)
    SEL_NOSH = 2'd2,  // register as is (format conversion)
    SEL_LOAD = 2'd3   // load operand: N^ into M1, B^ into M2
  } opsel_e;

  // Configurable CSA mode (alpha).
  typedef enum logic {
    CSA_1F = 1'b0,    // one three-input carry-save addition (full adders)
    CSA_2H = 1'b1     // two serial two-input carry-save additions (half adders)
  } csa_mode_e;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_PRE      = 3'd1,  // (SS,SC) = 1F_CSA(B^, N^, 0)
    ST_PRE_CONV = 3'd2,  // while (SC != 0) 2H_CSA, then D^ = SS
    ST_LOOP     = 3'd3,  // Montgomery iterations i = -1 .. k+4
    ST_POST_SH  = 3'd4,  // first 2H_CSA of the result, applies the pending shift
    ST_POST     = 3'd5   // while (SC != 0) 2H_CSA, then done
  } state_e;

endpackage
