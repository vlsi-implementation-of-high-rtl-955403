// tb_mm_top: end-to-end test of the top level at its default size
// (1024-bit Montgomery multiplier), with no parameter overridden.
// Runs random and corner Montgomery multiplications, including a chain in
// which each result is the next operand (as in a modular exponentiation),
// and checks every result against modular arithmetic and every busy time
// against the cycle model. Meanwhile drives the 16 x 16 multiplier with
// random operands. Counts how often each mechanism occurs (skipped
// iteration, full iteration, each addend 0 / N^ / B^ / D^, more than one
// conversion pass before and after the loop, a worst-case carry chain
// converted in about k/2 passes, 16 x 16 products) and fails
// on any that never occurred.
module tb_mm_top;
  localparam int K = 1024;
  `include "mm_ref_funcs.svh"

  logic clk = 0, rst_n = 0;
  logic mm_start = 0, mm_busy, mm_done;
  logic [K:0] mm_a, mm_b, mm_s;
  logic [K-1:0] mm_n;
  logic [15:0] mul_a, mul_b;
  logic [31:0] mul_c;
  int checks = 0, failures = 0;
  int n_skip = 0, n_noskip = 0, n_pre_multi = 0, n_post_multi = 0, n_mul = 0, n_long_chain = 0;
  int n_x[4] = '{0, 0, 0, 0};

  mm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_mm.u_ctrl.state == scs_mm_pkg::ST_LOOP) begin
      if (dut.u_mm.skip_now) n_skip++; else n_noskip++;
      n_x[{dut.u_mm.a_ff, dut.u_mm.q_ff}]++;
    end
  end

  // 16 x 16 multiplier, one product per clock.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      n_mul++;
      if (mul_c != 32'(mul_a) * 32'(mul_b)) begin
        failures++; $display("16x16: %h * %h -> %h", mul_a, mul_b, mul_c);
      end
      mul_a = 16'($urandom);
      mul_b = 16'($urandom);
    end
  end

  task automatic run(input logic [K:0] a, input logic [K:0] b, input logic [K-1:0] n,
                     output logic [K:0] s);
    int cyc, exp_cyc, sk, pre, post;
    exp_cyc = ref_cycles(a, b, n, sk, pre, post);
    if (pre > 1) n_pre_multi++;
    if (post > 1) n_post_multi++;
    @(negedge clk);
    mm_a = a; mm_b = b; mm_n = n; mm_start = 1;
    @(negedge clk);
    mm_start = 0;
    cyc = 1;
    while (!mm_done) begin
      cyc++;
      @(negedge clk);
      if (cyc > 4 * K) break;
    end
    s = mm_s;
    checks++;
    if (!ref_check(a, b, n, s)) begin
      failures++; $display("wrong result: A=%h B=%h N=%h S=%h", a, b, n, s);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++; $display("latency %0d, expected %0d", cyc, exp_cyc);
    end
    $display("k=%0d: %0d cycles, %0d skipped iterations, %0d+%0d conversion passes",
             K, cyc, sk, pre, post);
  endtask

  initial begin
    logic [K:0] a, b, s;
    logic [K-1:0] n;
    mul_a = '0; mul_b = '0; mm_a = '0; mm_b = '0; mm_n = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      ref_rand_operands(a, b, n);
      if (t == 1) a = a >> (K / 2);           // many zero multiplier bits
      if (t == 2) begin a = (K+1)'(2 * {1'b0, n} - 1); b = a; end
      run(a, b, n, s);
    end
    // Worst-case carry chain in D^ = B^ + N^: B^ = 2^k - 8 and
    // N^ = 2^(k-1) + 9 leave one carry that must ripple through about k-5
    // bit positions. Double half-adder passes move it two positions per
    // clock, so about k/2 passes are expected instead of about k.
    n = '0; n[K-1] = 1'b1; n[3] = 1'b1; n[0] = 1'b1;
    b = (K+1)'((K+1)'(1) << (K - 3)) - 1'b1;
    a = (K+1)'(n) + 1'b1;
    begin
      int sk, pre, post, c;
      c = ref_cycles(a, b, n, sk, pre, post);
      checks++;
      if (pre < K / 2 - 4 || pre > K / 2) begin
        failures++; $display("long chain: %0d passes", pre);
      end else n_long_chain++;
    end
    run(a, b, n, s);
    // Chain of four products with one modulus.
    ref_rand_operands(a, b, n);
    for (int t = 0; t < 4; t++) begin
      run(a, b, n, s);
      a = s;
    end
    checks++;
    if (n_skip == 0 || n_noskip == 0 || n_pre_multi == 0 || n_post_multi == 0 ||
        n_x[0] == 0 || n_x[1] == 0 || n_x[2] == 0 || n_x[3] == 0 || n_mul == 0 || n_long_chain == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("skips %0d, full iterations %0d, addends 0/N/B/D %0d/%0d/%0d/%0d, multi-pass pre %0d post %0d, 16x16 products %0d",
             n_skip, n_noskip, n_x[0], n_x[1], n_x[2], n_x[3], n_pre_multi, n_post_multi, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
