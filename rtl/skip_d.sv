// skip_d: skip detector Skip_D.
//
// Works one iteration ahead of the carry-save adder. In iteration i the
// adder computes T = SS[i] + SC[i] + x, and S[i+1] = T / 2. The three least
// significant bits of T depend only on the three least significant bits of
// SS[i], SC[i] and x, and because B^ = B << 3 has three zero low bits (so D^
// and N^ agree there), x[2:0] = q^ ? N^[2:0] : 0 is known before x itself.
// A three-bit carry-save addition gives per bit j the sum s_j and carry
// c_{j+1}, so that the low bits of the next carry-save pair are
//   SS[i+1]_0 = s_1, SC[i+1]_0 = c_1, SS[i+1]_1 = s_2, SC[i+1]_1 = c_2.
// Then
//   q_{i+1}    = s_1 ^ c_1                  (parity of S[i+1])
//   q_{i+2}    = s_2 ^ c_2 ^ (s_1 & c_1)    (parity of S[i+1] / 2)
//   skip_{i+1} = allow & NOR(q_{i+1}, A_{i+1}, s_1 & c_1 & s_2 & c_2)
// Iteration i+1 is skipped when it would add nothing (A_{i+1} = q_{i+1} = 0);
// it then becomes one more right shift of SS and SC. That shift is exact
// when s_1 = c_1 = 0. When s_1 = c_1 = 1 the two dropped bits are worth 1 in
// S[i+2], and this 1 is put back into bit 0 of the shifted SC (inj_sc, free
// when c_2 = 0) or of the shifted SS (inj_ss, free when s_2 = 0); if all four
// bits are 1 the iteration is not skipped. Two 2-to-1 multiplexers pick the
// next q^ and A^: (q_{i+2}, A_{i+2}) on a skip, (q_{i+1}, A_{i+1}) otherwise.
// 'allow' is deasserted by the controller in the last iteration so that no
// skip runs past S[k+5]. The published detector gives the same three
// outputs from the same inputs; its exact equations are not reproduced
// here, and the bit-0 correction (inj_sc, inj_ss) is this design's own way
// of keeping the two-bit shift exact. Combinational.
module skip_d (
  input  logic [2:0] ss_lo,    // SS[i]_{2:0} (from M5)
  input  logic [2:0] sc_lo,    // SC[i]_{2:0} (from M4)
  input  logic [2:0] n_lo,     // N^_{2:0}
  input  logic       q_hat,    // q_i, selects N^ or D^ into x
  input  logic       a_i1,     // A_{i+1}
  input  logic       a_i2,     // A_{i+2}
  input  logic       allow,    // skipping permitted in this iteration
  output logic       skip,     // skip_{i+1}
  output logic       q_next,   // next q^
  output logic       a_next,   // next A^
  output logic       inj_sc,   // on a skip: set bit 0 of the shifted SC
  output logic       inj_ss,   // on a skip: set bit 0 of the shifted SS
  output logic       q_i1,     // q_{i+1}
  output logic       q_i2      // q_{i+2}
);
  logic [2:0] x_lo;
  logic [2:0] s;
  logic [3:1] c;

  always_comb begin
    x_lo = n_lo & {3{q_hat}};
    s    = ss_lo ^ sc_lo ^ x_lo;
    c    = (ss_lo & sc_lo) | (ss_lo & x_lo) | (sc_lo & x_lo);
    q_i1 = s[1] ^ c[1];
    q_i2 = s[2] ^ c[2] ^ (s[1] & c[1]);
    skip = ~(q_i1 | a_i1 | (s[1] & c[1] & s[2] & c[2])) & allow;
    inj_sc = skip & s[1] & c[1] & ~c[2];
    inj_ss = skip & s[1] & c[1] & c[2];
    q_next = skip ? q_i2 : q_i1;
    a_next = skip ? a_i2 : a_i1;
  end
endmodule
