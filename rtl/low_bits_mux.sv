// low_bits_mux: 3-bit 2-to-1 multiplexer (M4 for SC, M5 for SS).
//
// Gives the skip detector the three least significant bits of SS[i] / SC[i]
// straight from the register, without going through the wide 4-to-1
// multiplexers M1/M2: bits [3:1] of the register when the last iteration was
// not skipped, bits [4:2] when it was, with bit 0 set by 'inj' exactly as
// the wide multiplexer does after a skip that drops two 1 bits.
// Combinational. The 3-bit >>1 / >>2 selection is as published; the bit-0
// correction is this design's addition.
module low_bits_mux (
  input  logic [4:0] reg_lo,   // register bits [4:0]
  input  logic       skip,     // stored skip flag
  input  logic       inj,      // stored bit-0 correction for this vector
  output logic [2:0] y         // SS[i]_{2:0} or SC[i]_{2:0}
);
  assign y = skip ? (reg_lo[4:2] | {2'b00, inj}) : reg_lo[3:1];
endmodule
