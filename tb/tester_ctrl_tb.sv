// Self-checking test of tester_ctrl with a reference Gray counter model and
// a scripted checker output. Checks the number of P and L checks (2n and
// 4(n-1)), the length of a complete test, the counter steps in each scheme,
// the T flip-flop activity, and that an error injected at one check sets the
// right fail flag.
module tester_ctrl_tb;
  localparam int unsigned N = 8;
  localparam int unsigned W = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic g_clr, g_en, g_up, g_at_max, g_at_min;
  logic t_load, t_en, cap_clr, z0, z1;
  logic busy, done, chk_p, chk_l, fail_p, fail_l;
  logic [15:0] tchecks, terrors;
  int cnt = 0;
  int checks = 0, failures = 0;
  int inject_at;        // index of the check that sees an error, -1 none
  int nchk, np, nl, nup, ndown, ntog, cycles;

  tester_ctrl dut (.clk, .rst_n, .start, .g_clr, .g_en, .g_up, .g_at_max, .g_at_min,
                   .t_load, .t_en, .cap_clr, .z0, .z1, .busy, .done, .chk_p, .chk_l,
                   .fail_p, .fail_l, .checks(tchecks), .errors(terrors));
  always #5 clk = ~clk;

  assign g_at_max = (cnt == N - 1);
  assign g_at_min = (cnt == 0);
  // Checker output: valid except at the injected check.
  assign z0 = ((chk_p || chk_l) && nchk == inject_at) ? 1'b1 : 1'b0;
  assign z1 = 1'b1;

  always @(posedge clk) begin
    if (g_clr) cnt <= 0;
    else if (g_en) cnt <= g_up ? (cnt + 1) % N : (cnt + N - 1) % N;
    if (chk_p || chk_l) nchk <= nchk + 1;
    if (chk_p) np <= np + 1;
    if (chk_l) nl <= nl + 1;
    if (g_en && g_up) nup <= nup + 1;
    if (g_en && !g_up) ndown <= ndown + 1;
    if (t_en && !t_load) ntog <= ntog + 1;
  end

  task automatic run(input int inj, input logic exp_fp, input logic exp_fl);
    nchk = 0; np = 0; nl = 0; nup = 0; ndown = 0; ntog = 0; cycles = 0;
    inject_at = inj;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++; if (np != 2 * N) failures++;
    checks++; if (nl != 4 * (N - 1)) failures++;
    checks++; if (tchecks != 16'(2 * (3 * N - 2))) failures++;
    checks++; if (cycles != 5 * N + 4 + 8 * (N - 1)) begin failures++; $display("cycles %0d", cycles); end
    // P: n-1 up steps; L: n-1 up and n-1 down steps per vector
    checks++; if (nup != 3 * (N - 1)) begin failures++; $display("up %0d", nup); end
    checks++; if (ndown != 2 * (N - 1)) begin failures++; $display("down %0d", ndown); end
    // T flip-flops toggle twice per P configuration, then once between the L vectors
    checks++; if (ntog != 2 * N + 1) begin failures++; $display("tog %0d", ntog); end
    checks++; if (fail_p != exp_fp || fail_l != exp_fl) begin failures++; $display("fail %0d %0d", fail_p, fail_l); end
    checks++; if (terrors != 16'(inj >= 0)) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(-1, 1'b0, 1'b0);
    run(5, 1'b1, 1'b0);      // a P check
    run(2 * N + 9, 1'b0, 1'b1);  // an L check
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
