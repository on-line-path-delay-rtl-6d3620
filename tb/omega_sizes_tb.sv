// Runs the complete design at other network sizes (4x4 and 16x16, narrow
// slices): normal sessions with every Gray-counter permutation, the
// production test and the on-line test. The production test must make
// exactly 2(3n-2) checks, n for each of the 2n P sessions' halves and
// 4(n-1) L checks, and both tests must pass.
module omega_sizes_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [1:0] finished = '0;

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (finished == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_size
    localparam int unsigned N  = (gi == 0) ? 4 : 16;
    localparam int unsigned M  = (gi == 0) ? 2 : 1;
    localparam int unsigned ST = $clog2(N);
    logic prod_mode = 0, tst_start = 0, ol_mode = 0, ol_start = 0;
    logic tst_busy, tst_done, tst_fail_p, tst_fail_l, tst_chk_p, tst_chk_l;
    logic [15:0] tst_checks, tst_errors;
    logic ol_busy, ol_done;
    logic [N-1:0] ol_fail, ol_chk_p, ol_chk_l;
    logic [N-1:0] proc_tx_wr = '0, proc_rx_rd = '0, proc_req_valid = '0;
    logic [N-1:0][M-1:0] proc_tx_wdata = '0, proc_rx_rdata;
    logic [N-1:0] proc_tx_full, proc_rx_empty, proc_grant;
    logic [N-1:0][2:0] proc_rx_count;
    logic [N-1:0][ST-1:0] proc_req_dest = '0;
    logic in_session, session_done;
    int n_ol = 0;

    omega_min_system #(.N_PORTS(N), .M(M), .DEPTH(4)) dut (.*);

    always @(posedge clk) if (rst_n) n_ol += $countones(ol_chk_l);

    initial begin
      @(posedge rst_n);
      @(negedge clk);
      // every uniform setting as a processor session: all granted
      for (int g = 0; g < N; g++) begin
        int rev;
        rev = 0;
        for (int i = 0; i < ST; i++) if (g[i]) rev |= 1 << (ST - 1 - i);
        for (int s = 0; s < N; s++) proc_req_dest[s] = ST'(s ^ rev);
        proc_req_valid = '1;
        @(negedge clk);
        proc_req_valid = '0;
        while (!session_done) @(negedge clk);
        checks++; if (proc_grant != '1) failures++;
        proc_rx_rd = '1;
        @(negedge clk);
        proc_rx_rd = '0;
      end
      // production test
      prod_mode = 1;
      @(negedge clk) tst_start = 1;
      @(negedge clk) tst_start = 0;
      while (!tst_done) @(negedge clk);
      checks++; if (tst_fail_p || tst_fail_l || tst_errors != '0) failures++;
      checks++; if (tst_checks != 16'(2 * (3 * N - 2))) failures++;
      prod_mode = 0;
      // on-line test
      ol_mode = 1;
      @(negedge clk) ol_start = 1;
      @(negedge clk) ol_start = 0;
      while (!ol_done) @(negedge clk);
      checks++; if (ol_fail != '0) failures++;
      checks++; if (n_ol != N * 2 * 2 * (1 + 2 * (N - 1))) failures++;
      ol_mode = 0;
      $display("n=%0d: tester checks %0d, on-line L checks %0d", N, tst_checks, n_ol);
      finished[gi] = 1'b1;
    end
  end
endmodule
