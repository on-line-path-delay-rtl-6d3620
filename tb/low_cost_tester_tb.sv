// Self-checking test of low_cost_tester driving an 8x8 MIN model that can
// hold a path delay fault. Fault free, all 2(3n-2) checks pass; a late
// destination line fails the P and the L checks; a control input of one
// switch acting one period late fails only the L checks, for every switch.
module low_cost_tester_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 4;
  localparam int unsigned ST = $clog2(N);
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][M-1:0] src, dst;
  logic [ST-1:0] sctrl;
  logic [ST-1:0][N/2-1:0] ctrl;
  logic busy, done, chk_p, chk_l, fail_p, fail_l;
  logic [15:0] tchecks, terrors;
  logic [1:0] mode;
  int unsigned slow_dst, slow_stage, slow_sw;
  int checks = 0, failures = 0;
  int cycles;

  low_cost_tester #(.N_PORTS(N), .M(M)) dut (
    .clk, .rst_n, .start, .min_src(src), .min_stage_ctrl(sctrl), .min_dst(dst),
    .busy, .done, .chk_p, .chk_l, .fail_p, .fail_l, .checks(tchecks), .errors(terrors));

  for (genvar st = 0; st < ST; st++) begin : g_bc
    assign ctrl[st] = {(N/2){sctrl[st]}};
  end

  slow_min #(.N_PORTS(N), .M(M)) u_net (
    .clk, .mode, .slow_dst, .slow_stage, .slow_sw, .src, .ctrl, .dst);

  always #5 clk = ~clk;

  task automatic run(input logic exp_fp, input logic exp_fl);
    cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++; if (tchecks != 16'(2 * (3 * N - 2))) failures++;
    checks++; if (cycles != 5 * N + 4 + 8 * (N - 1)) failures++;
    checks++;
    if (fail_p != exp_fp || fail_l != exp_fl) begin
      failures++;
      $display("mode %0d dst %0d st %0d sw %0d: fail_p %0d fail_l %0d", mode, slow_dst,
               slow_stage, slow_sw, fail_p, fail_l);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 0; slow_dst = 0; slow_stage = 0; slow_sw = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1'b0, 1'b0);
    mode = 1;
    for (int d = 0; d < N; d++) begin
      slow_dst = d;
      run(1'b1, 1'b1);
    end
    mode = 2;
    for (int st = 0; st < ST; st++)
      for (int k = 0; k < N / 2; k++) begin
        slow_stage = st; slow_sw = k;
        run(1'b0, 1'b1);
      end
    mode = 0;
    run(1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
