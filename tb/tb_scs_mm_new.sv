// tb_scs_mm_new: random Montgomery multiplications on a reduced operand
// length. Each result is checked against modular arithmetic, and the busy
// time against the cycle model of the iteration scheme. Results are also
// fed back as operands (chained products), and corner operands (A, B = 0,
// 2N^-1, one-hot) are included. Counts and requires skipped iterations,
// multi-pass conversions and every addend choice (0, N^, B^, D^).
module tb_scs_mm_new;
  localparam int K = 32;
  `include "mm_ref_funcs.svh"

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [K:0] a_in, b_in, result;
  logic [K-1:0] n_in;
  int checks = 0, failures = 0;
  int n_skip = 0, n_noskip = 0, n_pre_multi = 0, n_post_multi = 0;
  int n_x[4] = '{0, 0, 0, 0};

  scs_mm_new #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism coverage, sampled in the iteration loop.
  always @(posedge clk) begin
    if (dut.u_ctrl.state == scs_mm_pkg::ST_LOOP) begin
      if (dut.skip_now) n_skip++; else n_noskip++;
      n_x[{dut.a_ff, dut.q_ff}]++;
    end
  end

  task automatic run(input logic [K:0] a, input logic [K:0] b, input logic [K-1:0] n,
                     output logic [K:0] s);
    int cyc, exp_cyc, sk, pre, post;
    exp_cyc = ref_cycles(a, b, n, sk, pre, post);
    if (pre > 1) n_pre_multi++;
    if (post > 1) n_post_multi++;
    @(negedge clk);
    a_in = a; b_in = b; n_in = n; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;   // the done cycle itself
    while (!done) begin
      cyc++;
      @(negedge clk);
      if (cyc > 10 * K + 100) break;
    end
    s = result;
    checks++;
    if (!ref_check(a, b, n, s)) begin
      failures++; $display("wrong: A=%h B=%h N=%h S=%h", a, b, n, s);
    end
    checks++;
    if (cyc != exp_cyc || cyc > 3 * K + 20) begin
      failures++; $display("latency %0d, expected %0d", cyc, exp_cyc);
    end
  endtask

  initial begin
    logic [K:0] a, b, s;
    logic [K-1:0] n;
    a_in = '0; b_in = '0; n_in = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      ref_rand_operands(a, b, n);
      case (t % 10)
        1: a = '0;
        2: begin a = (K+1)'(2 * {1'b0, n} - 1); b = a; end
        3: b = (K+1)'(1) << ($urandom % K);
        4: a = '1 >> 3;
        default: ;
      endcase
      if (a >= 2 * {1'b0, n}) a = a % {1'b0, n};
      run(a, b, n, s);
      // chain: the result is a valid operand again
      run(s, b, n, s);
    end
    checks++;
    if (n_skip == 0 || n_noskip == 0 || n_pre_multi == 0 || n_post_multi == 0 ||
        n_x[0] == 0 || n_x[1] == 0 || n_x[2] == 0 || n_x[3] == 0) begin
      failures++;
      $display("mechanism not exercised: skip %0d noskip %0d pre %0d post %0d x %0d %0d %0d %0d",
               n_skip, n_noskip, n_pre_multi, n_post_multi, n_x[0], n_x[1], n_x[2], n_x[3]);
    end
    $display("skips %0d, full iterations %0d, multi-pass pre %0d post %0d",
             n_skip, n_noskip, n_pre_multi, n_post_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
