// tb_zero_d: zero detector on all-zero, every one-hot and random vectors.
module tb_zero_d;
  localparam int W = 40;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] v);
    sc = v;
    #1;
    checks++;
    if (zero != (v == '0)) begin
      failures++; $display("sc=%h zero=%b", v, zero);
    end
  endtask

  initial begin
    check('0);
    for (int j = 0; j < W; j++) check(W'(1) << j);
    for (int n = 0; n < 100; n++) check({$urandom, $urandom} & {W{n[0]}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
