// tb_low_bits_mux: exhaustive check that M4/M5 give (reg / 2) mod 8, or
// (reg / 4 + inj) mod 8 after a skip (inj only where bit 2 of reg is 0).
module tb_low_bits_mux;
  logic [4:0] reg_lo;
  logic skip, inj;
  logic [2:0] y;
  int checks = 0, failures = 0;

  low_bits_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      {inj, skip, reg_lo} = 7'(v);
      if (skip && inj && reg_lo[2]) continue;
      #1;
      checks++;
      if (int'(y) != ((int'(reg_lo) / (skip ? 4 : 2) + (skip ? int'(inj) : 0)) % 8)) begin
        failures++; $display("reg_lo=%b skip=%b y=%b", reg_lo, skip, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
