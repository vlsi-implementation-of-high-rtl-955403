// tb_scs_mm_ctrl: drives the controller through whole multiplications with
// random conversion lengths and random skip decisions (the skip flag
// register is modelled here) and checks, cycle by cycle, the select code,
// the adder mode, the register strobes, the 'allow' window and the number
// of loop cycles against an iteration-index model (i from -1 to k+4,
// stepping by 2 on a skip).
module tb_scs_mm_ctrl;
  import scs_mm_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0, start = 0, zero = 0, skip_now = 0, skip_ff = 0;
  opsel_e sel;
  csa_mode_e mode;
  logic op_load, reg_we, reg_clr, d_we, ff_we, ff_clr, a_shift, allow, busy, done;
  int checks = 0, failures = 0;

  scs_mm_ctrl #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++; $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    int npre, npost, i, loops, exp_loops, nskips;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int op = 0; op < 40; op++) begin
      npre  = $urandom % 4;
      npost = $urandom % 4;
      // IDLE
      @(negedge clk);
      expect_("idle busy", !busy);
      start = 1; #1;
      expect_("start strobes", op_load && ff_clr && !reg_we);
      @(negedge clk); start = 0; skip_ff = 0; #1;
      // PRE
      expect_("pre", sel == SEL_LOAD && mode == CSA_1F && reg_we && busy);
      // PRE_CONV
      for (int n = 0; n <= npre; n++) begin
        @(negedge clk); zero = (n == npre); #1;
        if (n < npre) expect_("pre conv pass", sel == SEL_NOSH && mode == CSA_2H && reg_we && !d_we);
        else          expect_("pre conv end", d_we && reg_clr);
      end
      // LOOP
      i = -1; loops = 0; nskips = 0;
      forever begin
        @(negedge clk); zero = 0;
        #1;
        expect_("allow window", allow == (i + 1 <= K + 4));
        skip_now = allow && ($urandom % 3 == 0); #1;
        expect_("loop strobes", reg_we && ff_we && a_shift && mode == CSA_1F &&
                sel == (skip_ff ? SEL_SH2 : SEL_SH1));
        loops++;
        nskips += skip_now;
        i += skip_now ? 2 : 1;
        @(posedge clk); skip_ff = skip_now;
        if (i > K + 4) break;
      end
      exp_loops = K + 6 - nskips;
      expect_("loop count", loops == exp_loops);
      // POST_SH
      @(negedge clk); skip_now = 0; #1;
      expect_("post shift", mode == CSA_2H && reg_we && ff_clr &&
              sel == (skip_ff ? SEL_SH2 : SEL_SH1));
      @(posedge clk); skip_ff = 0;
      // POST
      for (int n = 0; n <= npost; n++) begin
        @(negedge clk); zero = (n == npost); #1;
        if (n < npost) expect_("post pass", sel == SEL_NOSH && mode == CSA_2H && reg_we && !done);
        else           expect_("done", done && !reg_we);
      end
      @(negedge clk); zero = 0; #1;
      expect_("back to idle", !busy && !done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
