// scs_mm_new: radix-2 Montgomery modular multiplier with one-level
// configurable carry-save adder, quotient precomputation and iteration
// skipping (SCS-MM-New).
//
// Computes S = A * B * 2^-(k+2) mod N^ with 0 <= S < 2*N^, for an odd
// modulus N^ < 2^k and operands A, B < 2*N^, so a result can be fed straight
// back as an operand. The intermediate sum is kept in carry-save form
// (SS, SC); only one k-bit adder row (ccsa) exists, and it is reused for
// three jobs:
//   1. D^ = B^ + N^ with B^ = B << 3: one full-adder pass, then repeated
//      double half-adder passes until SC = 0 (each pass halves the number
//      of cycles a plain carry-save conversion would take);
//   2. the iterations S[i+1] = (S[i] + x) / 2, x in {0, N^, B^, D^} picked by
//      SM3 from the precomputed (A^, q^);
//   3. the final carry-save to binary conversion, as in job 1.
// The division by two of an iteration is not done on the adder output: the
// SS/SC registers store the unshifted sum and M1/M2 apply >>1 (or >>2 after
// a skipped iteration) in the next cycle. The skip detector predicts, one
// iteration ahead, the next quotient bit and whether the next iteration
// would add nothing; such an iteration is merged into the shift (>>2). When
// that shift drops two set bit-0 carry-save bits, their value is put back as
// bit 0 of one shifted vector (flip-flops inj_sc / inj_ss).
// The datapath (registers, M1/M2, SM3, CCSA, M4/M5, Skip_D, Zero_D) follows
// the published architecture; the bit-0 correction, the exact skip rule, the
// port widths and the start/done handshake are this design's own.
// The three zero low bits of B^ make the quotient predictable from three
// register bits; they cost three more iterations (k+6 in all, i = -1..k+4).
// Internal width W = k+6 holds every value the datapath reaches
// (x < 17*N^, unshifted sum < 34*2^k).
//
// Interface: pulse 'start' with a_in, b_in, n_in valid (they are registered
// at that edge). 'done' pulses for one cycle when 'result' is valid; it
// stays valid until the next start. Latency:
//   1 + (pre-conversion passes + 1) + (k+6 - skips) + 1 + (post passes + 1)
// clock cycles from the cycle after start to done, inclusive (about 850 for
// random 1024-bit operands).
module scs_mm_new
  import scs_mm_pkg::*;
#(
  parameter int unsigned K = 1024          // operand length in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a_in,     // A < 2*N^
  input  logic [K:0]   b_in,     // B < 2*N^
  input  logic [K-1:0] n_in,     // N^, odd
  output logic         busy,
  output logic         done,
  output logic [K:0]   result    // S[k+5] < 2*N^
);
  localparam int unsigned W = K + 6;

  // Datapath registers.
  logic [W-1:0] n_reg, b_reg, d_reg, ss_reg, sc_reg;
  logic         skip_ff, inj_sc_ff, inj_ss_ff, q_ff, a_ff;

  // Control.
  opsel_e    sel;
  csa_mode_e mode;
  logic      op_load, reg_we, reg_clr, d_we, ff_we, ff_clr, a_shift, allow;
  logic      zero, skip_now, inj_sc, inj_ss, q_nx, a_nx, q_i1, q_i2, a_i1, a_i2;

  // Datapath wires.
  logic [W-1:0] m1_y, m2_y, x, ss_n, sc_n;
  logic [2:0]   ss_lo, sc_lo;

  shift_sel_mux #(.W(W)) u_m1 (.reg_val(sc_reg), .load_val(n_reg), .sel(sel),
                                .inj(inj_sc_ff), .y(m1_y));
  shift_sel_mux #(.W(W)) u_m2 (.reg_val(ss_reg), .load_val(b_reg), .sel(sel),
                                .inj(inj_ss_ff), .y(m2_y));

  sm3 #(.W(W)) u_sm3 (
    .n_hat(n_reg), .b_hat(b_reg), .d_hat(d_reg), .q_hat(q_ff), .a_hat(a_ff), .x(x)
  );

  ccsa #(.W(W)) u_ccsa (.a(m1_y), .b(m2_y), .x(x), .mode(mode), .ss(ss_n), .sc(sc_n));

  low_bits_mux u_m4 (.reg_lo(sc_reg[4:0]), .skip(skip_ff), .inj(inj_sc_ff), .y(sc_lo));
  low_bits_mux u_m5 (.reg_lo(ss_reg[4:0]), .skip(skip_ff), .inj(inj_ss_ff), .y(ss_lo));

  a_shift_reg #(.AW(K + 1)) u_a (
    .clk(clk), .rst_n(rst_n), .load(op_load), .a_in(a_in),
    .shift(a_shift), .skip(skip_now), .a_i1(a_i1), .a_i2(a_i2)
  );

  skip_d u_skip (
    .ss_lo(ss_lo), .sc_lo(sc_lo), .n_lo(n_reg[2:0]), .q_hat(q_ff),
    .a_i1(a_i1), .a_i2(a_i2), .allow(allow),
    .skip(skip_now), .q_next(q_nx), .a_next(a_nx), .inj_sc(inj_sc), .inj_ss(inj_ss),
    .q_i1(q_i1), .q_i2(q_i2)
  );

  zero_d #(.W(W)) u_zero (.sc(sc_reg), .zero(zero));

  scs_mm_ctrl #(.K(K)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .zero(zero),
    .skip_now(skip_now), .skip_ff(skip_ff),
    .sel(sel), .mode(mode), .op_load(op_load), .reg_we(reg_we),
    .reg_clr(reg_clr), .d_we(d_we), .ff_we(ff_we), .ff_clr(ff_clr),
    .a_shift(a_shift), .allow(allow), .busy(busy), .done(done)
  );

  // Operand registers N^, B^ = B << 3, D^.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_reg <= '0;
      b_reg <= '0;
      d_reg <= '0;
    end else begin
      if (op_load) begin
        n_reg <= W'(n_in);
        b_reg <= W'({b_in, 3'b000});
      end
      if (d_we) d_reg <= ss_reg;
    end
  end

  // Carry-save result registers SS, SC.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss_reg <= '0;
      sc_reg <= '0;
    end else if (reg_clr) begin
      ss_reg <= '0;
      sc_reg <= '0;
    end else if (reg_we) begin
      ss_reg <= ss_n;
      sc_reg <= sc_n;
    end
  end

  // skip_{i+1} (with its bit-0 corrections), q^ and A^ flip-flops.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip_ff   <= 1'b0;
      inj_sc_ff <= 1'b0;
      inj_ss_ff <= 1'b0;
      q_ff      <= 1'b0;
      a_ff      <= 1'b0;
    end else if (ff_clr) begin
      skip_ff   <= 1'b0;
      inj_sc_ff <= 1'b0;
      inj_ss_ff <= 1'b0;
      q_ff      <= 1'b0;
      a_ff      <= 1'b0;
    end else if (ff_we) begin
      skip_ff   <= skip_now;
      inj_sc_ff <= inj_sc;
      inj_ss_ff <= inj_ss;
      q_ff      <= q_nx;
      a_ff      <= a_nx;
    end
  end

  assign result = ss_reg[K:0];

  // In the loop the stored sum is always even (its low carry-save bits are
  // zero). Before a double shift the weight-2 bits are either both 0, or
  // both 1 with the bit-0 correction aimed at a vector whose bit 2 is 0:
  // the shifts by M1/M2 then lose nothing.
  a_even_sum : assert property (@(posedge clk) disable iff (!rst_n)
      (reg_we && sel == SEL_SH1) |-> (ss_reg[0] == 1'b0 && sc_reg[0] == 1'b0))
    else $error("odd carry-save sum before a shift");
  a_skip_exact : assert property (@(posedge clk) disable iff (!rst_n)
      (reg_we && sel == SEL_SH2) |->
        (ss_reg[0] == 1'b0 && sc_reg[0] == 1'b0 &&
         ((ss_reg[1] == 1'b0 && sc_reg[1] == 1'b0 && !inj_sc_ff && !inj_ss_ff) ||
          (ss_reg[1] == 1'b1 && sc_reg[1] == 1'b1 &&
           ((inj_sc_ff && !inj_ss_ff && !sc_reg[2]) ||
            (inj_ss_ff && !inj_sc_ff && !ss_reg[2]))))))
    else $error("double shift would drop a set bit");
endmodule
