// tb_ccsa: random test of the W-bit configurable carry-save adder.
// 1F mode: ss + sc = a + b + x. 2H mode: ss + sc = a + b, and the pair equals
// two successive half-adder carry-save steps. sc[0] is always 0.
module tb_ccsa;
  import scs_mm_pkg::*;
  localparam int W = 24;
  logic [W-1:0] a, b, x, ss, sc;
  csa_mode_e mode;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s1, c1, s2, c2;
    for (int n = 0; n < 2000; n++) begin
      // keep the sum inside W bits
      a = W'($urandom) >> 2;
      b = W'($urandom) >> 2;
      x = W'($urandom) >> 2;
      if (n % 7 == 0) begin a = '1 >> 2; b = W'(1); end   // long carry chain
      mode = (n % 2 == 0) ? CSA_1F : CSA_2H;
      #1;
      checks++;
      if (mode == CSA_1F) begin
        if (ss + sc != a + b + x || sc[0]) begin
          failures++; $display("1F: %h+%h+%h -> %h,%h", a, b, x, ss, sc);
        end
      end else begin
        s1 = a ^ b;  c1 = (a & b) << 1;
        s2 = s1 ^ c1; c2 = (s1 & c1) << 1;
        if (ss + sc != a + b || ss != s2 || sc != c2) begin
          failures++; $display("2H: %h+%h -> %h,%h", a, b, ss, sc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
