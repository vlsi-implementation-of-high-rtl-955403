// tb_sm3: checks that SM3 picks 0, N^, B^ or D^ for (A^, q^) = 00, 01, 10, 11.
module tb_sm3;
  localparam int W = 20;
  logic [W-1:0] n_hat, b_hat, d_hat, x, exp_x;
  logic q_hat, a_hat;
  int checks = 0, failures = 0;

  sm3 #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      n_hat = W'($urandom) | W'(1);
      b_hat = W'($urandom) << 3;
      d_hat = W'($urandom);
      {a_hat, q_hat} = 2'(n);
      case ({a_hat, q_hat})
        2'b00: exp_x = '0;
        2'b01: exp_x = n_hat;
        2'b10: exp_x = b_hat;
        default: exp_x = d_hat;
      endcase
      #1;
      checks++;
      if (x !== exp_x) begin
        failures++; $display("sel %b: got %h want %h", {a_hat, q_hat}, x, exp_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
