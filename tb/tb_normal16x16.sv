// tb_normal16x16: the 16 x 16 multiplier against the built-in product on
// corner values and random operands.
module tb_normal16x16;
  logic [15:0] a, b;
  logic [31:0] c;
  int checks = 0, failures = 0;

  normal16x16 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    longint unsigned p;
    a = x; b = y;
    #1;
    p = longint'(x) * longint'(y);
    checks++;
    if (c != p[31:0]) begin
      failures++; $display("%h * %h = %h, got %h", x, y, p[31:0], c);
    end
  endtask

  initial begin
    check(16'h0000, 16'hFFFF);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFF8, 16'h0FFF);
    check(16'h8000, 16'h8000);
    for (int n = 0; n < 2000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
