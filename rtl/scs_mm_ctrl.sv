// scs_mm_ctrl: control part of the SCS-MM-New multiplier.
//
// Sequences one Montgomery multiplication on the shared one-level CCSA:
//   ST_PRE      (SS,SC) = 1F_CSA(B^, N^, 0)                      1 cycle
//   ST_PRE_CONV while SC != 0: (SS,SC) = 2H_CSA(SS,SC); on SC == 0
//               D^ = SS and SS, SC are cleared                    >= 1 cycle
//   ST_LOOP     iterations i = -1 .. k+4, one per cycle, i advancing by 2
//               when the skip detector skips an iteration          <= k+6 cycles
//   ST_POST_SH  one 2H_CSA on the shifted result (applies the division by
//               two left pending from the last iteration)          1 cycle
//   ST_POST     while SC != 0: 2H_CSA; on SC == 0, done           >= 1 cycle
// The iteration counter holds cnt = i + 1. A skip is allowed while
// cnt <= k+4 (iteration i+1 still belongs to the loop); the loop ends when
// cnt passes k+5. The mandatory ST_POST_SH cycle and the one-cycle zero test
// in each conversion loop are this design's choices.
// Interface: 'start' is sampled in ST_IDLE; 'done' pulses for one cycle when
// the result is in the SS register; 'busy' is high from the cycle after
// 'start' until 'done'.
module scs_mm_ctrl
  import scs_mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      zero,      // Zero_D: SC register == 0
  input  logic      skip_now,  // Skip_D: skip_{i+1} of this iteration
  input  logic      skip_ff,   // stored skip flag
  output opsel_e    sel,       // M1 / M2 select
  output csa_mode_e mode,      // CCSA alpha
  output logic      op_load,   // load N^, B^, A registers
  output logic      reg_we,    // write SS, SC
  output logic      reg_clr,   // clear SS, SC
  output logic      d_we,      // D^ = SS
  output logic      ff_we,     // write skip, q^, A^ flip-flops from Skip_D
  output logic      ff_clr,    // clear skip, q^, A^ flip-flops
  output logic      a_shift,   // advance the A register
  output logic      allow,     // skipping allowed in this iteration
  output logic      busy,
  output logic      done
);
  localparam int unsigned CW = $clog2(K + 8);
  localparam logic [CW-1:0] LAST_SKIP = CW'(K + 4);  // last cnt that may skip
  localparam logic [CW-1:0] LAST_ITER = CW'(K + 5);  // last cnt in the loop

  state_e        state, state_n;
  logic [CW-1:0] cnt, cnt_n;
  logic [CW-1:0] cnt_step;

  always_comb begin
    sel      = SEL_SH1;
    mode     = CSA_1F;
    op_load  = 1'b0;
    reg_we   = 1'b0;
    reg_clr  = 1'b0;
    d_we     = 1'b0;
    ff_we    = 1'b0;
    ff_clr   = 1'b0;
    a_shift  = 1'b0;
    allow    = 1'b0;
    done     = 1'b0;
    state_n  = state;
    cnt_n    = cnt;
    cnt_step = cnt + (skip_now ? CW'(2) : CW'(1));

    unique case (state)
      ST_IDLE: begin
        if (start) begin
          op_load = 1'b1;
          ff_clr  = 1'b1;
          state_n = ST_PRE;
        end
      end
      ST_PRE: begin
        sel     = SEL_LOAD;
        mode    = CSA_1F;        // x = 0: q^ = A^ = 0
        reg_we  = 1'b1;
        state_n = ST_PRE_CONV;
      end
      ST_PRE_CONV: begin
        if (zero) begin
          d_we    = 1'b1;
          reg_clr = 1'b1;        // SS[-1] = SC[-1] = 0
          cnt_n   = '0;          // i = -1
          state_n = ST_LOOP;
        end else begin
          sel    = SEL_NOSH;
          mode   = CSA_2H;
          reg_we = 1'b1;
        end
      end
      ST_LOOP: begin
        sel     = skip_ff ? SEL_SH2 : SEL_SH1;
        mode    = CSA_1F;
        reg_we  = 1'b1;
        allow   = (cnt <= LAST_SKIP);
        a_shift = 1'b1;
        cnt_n   = cnt_step;
        ff_we   = 1'b1;
        // On exit the skip flag must survive one more cycle: it picks the
        // shift of the result in ST_POST_SH, where x (q^, A^) is unused.
        if (cnt_step > LAST_ITER) state_n = ST_POST_SH;
      end
      ST_POST_SH: begin
        sel     = skip_ff ? SEL_SH2 : SEL_SH1;
        mode    = CSA_2H;
        reg_we  = 1'b1;
        ff_clr  = 1'b1;
        state_n = ST_POST;
      end
      ST_POST: begin
        if (zero) begin
          done    = 1'b1;
          state_n = ST_IDLE;
        end else begin
          sel    = SEL_NOSH;
          mode   = CSA_2H;
          reg_we = 1'b1;
        end
      end
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
    end
  end

  assign busy = (state != ST_IDLE);
endmodule
