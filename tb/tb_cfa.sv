// tb_cfa: exhaustive test of the configurable full adder cell.
// Full-adder mode: s + 2c must equal a + b + x. Double-half-adder mode:
// s + 2c must equal ((a + b) mod 2) + ha_cin and ha_c = (a + b) div 2.
module tb_cfa;
  logic a, b, x, ha_cin, alpha, s, c, ha_c;
  int checks = 0, failures = 0;

  cfa dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {alpha, a, b, x, ha_cin} = 5'(v);
      #1;
      checks++;
      if (!alpha) begin
        if (int'(s) + 2 * int'(c) != int'(a) + int'(b) + int'(x)) begin
          failures++; $display("FA mode wrong for %b", v[4:0]);
        end
      end else begin
        if (int'(s) + 2 * int'(c) != (int'(a) + int'(b)) % 2 + int'(ha_cin) ||
            int'(ha_c) != (int'(a) + int'(b)) / 2) begin
          failures++; $display("2HA mode wrong for %b", v[4:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
