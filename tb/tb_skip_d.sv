// tb_skip_d: exhaustive test of the skip detector over all low-bit patterns.
// Reference: T = SS[i]_{2:0} + SC[i]_{2:0} + x_{2:0} with x = q^ ? N^ : 0
// (B^ and D^ share N^'s low bits), computed as an integer. q_{i+1} is bit 1
// of T, q_{i+2} bit 2. The carry-save form of T has sum bit j = parity of
// the bit-j inputs and carry bit j+1 = majority of the bit-j inputs.
// A skip needs 'allow', A_{i+1} = 0, q_{i+1} = 0, and not all four bits of
// weight 2 and 4 set. When the weight-2 pair is 1,1 its value goes back as
// bit 0 of the shifted SC (if SC's weight-4 bit is 0) or else of SS.
module tb_skip_d;
  logic [2:0] ss_lo, sc_lo, n_lo;
  logic q_hat, a_i1, a_i2, allow, skip, q_next, a_next, q_i1, q_i2, inj_sc, inj_ss;
  int checks = 0, failures = 0;
  int nskip = 0;

  skip_d dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, xv, sbit, cbit, sbit2, cbit2;
    logic exp_skip, exp_q, exp_a, exp_isc, exp_iss;
    for (int v = 0; v < (1 << 13); v++) begin
      {ss_lo, sc_lo, n_lo, q_hat, a_i1, a_i2, allow} = 13'(v);
      if (n_lo[0] == 1'b0) continue;             // N^ is odd
      xv = q_hat ? int'(n_lo) : 0;
      t  = int'(ss_lo) + int'(sc_lo) + xv;
      if (t % 2 != 0) continue;                  // q^ makes every sum even
      sbit = (int'(ss_lo[1]) + int'(sc_lo[1]) + (xv / 2) % 2) % 2;
      cbit = (int'(ss_lo[0]) + int'(sc_lo[0]) + xv % 2) / 2;
      sbit2 = (int'(ss_lo[2]) + int'(sc_lo[2]) + (xv / 4) % 2) % 2;
      cbit2 = (int'(ss_lo[1]) + int'(sc_lo[1]) + (xv / 2) % 2) / 2;
      exp_skip = allow && !a_i1 && (t / 2) % 2 == 0 &&
                 !(sbit == 1 && cbit == 1 && sbit2 == 1 && cbit2 == 1);
      exp_isc  = exp_skip && sbit == 1 && cbit == 1 && cbit2 == 0;
      exp_iss  = exp_skip && sbit == 1 && cbit == 1 && cbit2 == 1;
      exp_q    = exp_skip ? 1'((t / 4) % 2) : 1'((t / 2) % 2);
      exp_a    = exp_skip ? a_i2 : a_i1;
      #1;
      checks++;
      if (skip != exp_skip || q_next != exp_q || a_next != exp_a ||
          inj_sc != exp_isc || inj_ss != exp_iss ||
          q_i1 != 1'((t / 2) % 2)) begin
        failures++;
        $display("ss=%b sc=%b n=%b q=%b a1=%b a2=%b al=%b: skip=%b q=%b a=%b",
                 ss_lo, sc_lo, n_lo, q_hat, a_i1, a_i2, allow, skip, q_next, a_next);
      end
      if (skip) nskip++;
    end
    checks++;
    if (nskip == 0) begin failures++; $display("no skip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
