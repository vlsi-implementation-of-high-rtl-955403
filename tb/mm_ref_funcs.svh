// mm_ref_funcs.svh: reference arithmetic for the Montgomery multiplier
// testbenches. Included inside a testbench module that defines the
// localparam K (operand length).
//
// ref_check          tells whether S is a correct result for (A, B, N^):
//                    S * 2^(k+2) = A * B (mod N^) and S < 2 * N^, using
//                    plain wide modular arithmetic.
// ref_cycles         predicts the clock cycles one multiplication keeps the
//                    unit busy by running the iteration scheme on whole
//                    integers, one loop turn per clock: one full-adder pass
//                    for B^ + N^, double half-adder passes until the carry
//                    vector is zero plus one zero test, k+6 iterations minus
//                    the skipped ones (a skip drops two low carry-save bits;
//                    if both were 1 their value is put back as bit 0 of the
//                    shifted vector whose bit 0 is free), one pass that applies the pending
//                    shift, further passes until the carry vector is zero
//                    plus one zero test.
// ref_rand_operands  draws an odd N^ of exactly k bits and A, B < 2N^.

localparam int RW = K + 6;
localparam int PW = 2 * K + 8;
typedef logic [RW-1:0] rword_t;

function automatic logic ref_check(logic [K:0] a, logic [K:0] b, logic [K-1:0] n,
                                   logic [K:0] s);
  logic [PW-1:0] lhs, rhs, nn;
  nn  = PW'(n);
  lhs = (PW'(s) << (K + 2)) % nn;
  rhs = (PW'(a) * PW'(b)) % nn;
  return (lhs == rhs) && (PW'(s) < 2 * nn);
endfunction

// Two serial half-adder carry-save steps on (ss, sc).
function automatic logic [2*RW-1:0] ref_two_ha(rword_t ss, rword_t sc);
  rword_t s1, c1;
  s1 = ss ^ sc;  c1 = (ss & sc) << 1;
  return {s1 ^ c1, (s1 & c1) << 1};
endfunction

function automatic int ref_cycles(logic [K:0] a, logic [K:0] b, logic [K-1:0] n,
                                  output int skips, output int pre_passes,
                                  output int post_passes);
  rword_t bh, nh, dh, ss, sc, x, ts, tc, t;
  int i, cyc;
  logic q, ah, skip, a1, isc, iss;
  bh = rword_t'(b) << 3;
  nh = rword_t'(n);
  cyc = 1;                                   // B^ + N^ (third input 0)
  ss = bh ^ nh;  sc = (bh & nh) << 1;
  pre_passes = 0;
  while (sc != 0) begin {ss, sc} = ref_two_ha(ss, sc); pre_passes++; end
  cyc += pre_passes + 1;
  dh = ss;
  ss = '0; sc = '0; q = 1'b0; ah = 1'b0; skip = 1'b0; isc = 1'b0; iss = 1'b0;
  skips = 0;
  i = -1;
  while (i <= K + 4) begin
    ts = skip ? (ss >> 2) | rword_t'(iss) : ss >> 1;
    tc = skip ? (sc >> 2) | rword_t'(isc) : sc >> 1;
    x  = ah ? (q ? dh : bh) : (q ? nh : '0);
    t  = ts + tc + x;                        // 2 * S[i+1]
    ss = ts ^ tc ^ x;
    sc = ((ts & tc) | (ts & x) | (tc & x)) << 1;
    a1 = (i + 1 > K) ? 1'b0 : a[i+1];
    // Skip when iteration i+1 adds nothing, unless the two weight-2 bit
    // pairs are all ones (the dropped value then has no free bit to go to).
    skip = (i + 1 <= K + 4) && !a1 && !t[1] && !(ss[1] && sc[1] && ss[2] && sc[2]);
    isc  = skip && ss[1] && sc[1] && !sc[2];
    iss  = skip && ss[1] && sc[1] && sc[2];
    if (skip) begin
      q  = t[2];
      ah = (i + 2 > K) ? 1'b0 : a[i+2];
      i += 2;
      skips++;
    end else begin
      q  = t[1];
      ah = a1;
      i += 1;
    end
    cyc++;
  end
  ss = skip ? (ss >> 2) | rword_t'(iss) : ss >> 1;
  sc = skip ? (sc >> 2) | rword_t'(isc) : sc >> 1;
  {ss, sc} = ref_two_ha(ss, sc);
  post_passes = 1;
  while (sc != 0) begin {ss, sc} = ref_two_ha(ss, sc); post_passes++; end
  cyc += post_passes + 1;
  return cyc;
endfunction

function automatic logic [K+1:0] ref_rand_bits();
  logic [K+1:0] r;
  for (int j = 0; j < K + 2; j++) r[j] = 1'($urandom);
  return r;
endfunction

task automatic ref_rand_operands(output logic [K:0] a, output logic [K:0] b,
                                 output logic [K-1:0] n);
  logic [K+1:0] r;
  r = ref_rand_bits();
  n = r[K-1:0];
  n[0] = 1'b1;
  n[K-1] = 1'b1;
  a = (K+1)'(ref_rand_bits() % (2 * (K+2)'(n)));
  b = (K+1)'(ref_rand_bits() % (2 * (K+2)'(n)));
endtask
