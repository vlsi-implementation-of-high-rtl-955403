// tb_shift_sel_mux: every select code of M1/M2 against a division / copy
// model; after a double shift 'inj' adds 1 (applied only where bit 0 is free).
module tb_shift_sel_mux;
  import scs_mm_pkg::*;
  localparam int W = 24;
  logic [W-1:0] reg_val, load_val, y, exp_y;
  opsel_e sel;
  logic inj;
  int checks = 0, failures = 0;

  shift_sel_mux #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      reg_val  = W'($urandom);
      load_val = W'($urandom);
      sel      = opsel_e'(n % 4);
      inj      = 1'($urandom);
      if (n % 4 == 1 && inj) reg_val[2] = 1'b0;   // bit 0 of the result is free
      case (n % 4)
        0: exp_y = reg_val / 2;
        1: exp_y = reg_val / 4 + W'(inj);
        2: exp_y = reg_val;
        default: exp_y = load_val;
      endcase
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++; $display("sel %0d: got %h want %h", n % 4, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
