// tb_a_shift_reg: loads random A values, advances by one or two iterations
// at random and compares A_{i+1}, A_{i+2} with bits of the loaded value
// indexed by a separately kept iteration number i (starting at -1).
module tb_a_shift_reg;
  localparam int AW = 20;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, skip = 0, a_i1, a_i2;
  logic [AW-1:0] a_in;
  int checks = 0, failures = 0;

  a_shift_reg #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_of(logic [AW-1:0] v, int idx);
    return (idx >= 0 && idx < AW) ? v[idx] : 1'b0;
  endfunction

  initial begin
    logic [AW-1:0] aval;
    int i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 20; op++) begin
      aval = AW'($urandom);
      @(negedge clk); a_in = aval; load = 1;
      @(negedge clk); load = 0;
      i = -1;
      while (i < AW + 2) begin
        checks++;
        if (a_i1 != bit_of(aval, i + 1) || a_i2 != bit_of(aval, i + 2)) begin
          failures++; $display("i=%0d a_i1=%b a_i2=%b", i, a_i1, a_i2);
        end
        shift = ($urandom % 4) != 0;
        skip  = $urandom % 2;
        @(negedge clk);
        if (shift) i += skip ? 2 : 1;
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
