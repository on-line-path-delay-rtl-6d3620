// End-to-end test of omega_min_system at its default size (8x8, 8-bit
// slice, 4-word buffers).
//  1. Normal traffic: processors fill their transmit buffers and request
//     destinations (random permutations, which an Omega network often
//     cannot set up at once, so refused sources retry in later sessions)
//     and sessions with conflicting requests. Every granted destination must receive exactly the words of
//     its source; refused sources must see grant low.
//  2. Production test with the low-cost tester: no fail, 2(3n-2) checks.
//  3. On-line test by the agents: no fail.
//  4. Normal traffic again.
// Each mechanism (P and L checks of both test methods, granted and refused
// requests, sessions carrying data) must happen at least once.
module omega_min_system_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 8;
  localparam int unsigned D  = 4;
  localparam int unsigned ST = 3;
  logic clk = 0, rst_n = 0;
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
  int checks = 0, failures = 0;
  int n_tp = 0, n_tl = 0, n_op = 0, n_ol = 0, n_granted = 0, n_refused = 0;
  int n_sessions = 0, n_words = 0;

  omega_min_system dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (tst_chk_p) n_tp++;
    if (tst_chk_l) n_tl++;
    n_op += $countones(ol_chk_p);
    n_ol += $countones(ol_chk_l);
    if (session_done) n_sessions++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Processor traffic: the requesting sources send nw words each. Refused
  // sources keep their words and request again in the next session, until
  // every source has been served. first_grant returns the grants of the
  // first session.
  task automatic traffic(input logic [N-1:0] rv, input logic [N-1:0][ST-1:0] rd, input int nw,
                         output logic [N-1:0] first_grant);
    logic [M-1:0] words [N][D];
    logic [N-1:0] pending;
    int rounds;
    for (int s = 0; s < N; s++) for (int i = 0; i < nw; i++) words[s][i] = M'($urandom);
    for (int i = 0; i < nw; i++) begin
      for (int s = 0; s < N; s++) begin
        proc_tx_wr[s] = rv[s];
        proc_tx_wdata[s] = words[s][i];
      end
      @(negedge clk);
    end
    proc_tx_wr = '0;
    pending = rv;
    rounds = 0;
    while (pending != '0 && rounds < N) begin
      proc_req_valid = pending;
      proc_req_dest = rd;
      @(negedge clk);
      proc_req_valid = '0;
      while (!session_done) @(negedge clk);
      if (rounds == 0) first_grant = proc_grant;
      rounds++;
      for (int s = 0; s < N; s++) if (pending[s]) begin
        if (proc_grant[s]) begin
          int d;
          n_granted++;
          pending[s] = 1'b0;
          d = int'(rd[s]);
          chk(int'(proc_rx_count[d]) == nw + 1, "word count at destination");
          proc_rx_rd[d] = 1'b1;          // first word: data held from before
          @(negedge clk);
          for (int i = 0; i < nw; i++) begin
            chk(proc_rx_rdata[d] == words[s][i], "received word");
            n_words++;
            @(negedge clk);
          end
          proc_rx_rd[d] = 1'b0;
        end else n_refused++;
      end
      for (int d = 0; d < N; d++) chk(proc_rx_empty[d], "nothing else received");
    end
    chk(pending == '0, "every source served");
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][ST-1:0] rd;
    logic [N-1:0] g;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. normal traffic: a random permutation through the network
    for (int it = 0; it < 4; it++) begin
      int perm [N];
      for (int s = 0; s < N; s++) perm[s] = s;
      perm.shuffle();
      for (int s = 0; s < N; s++) rd[s] = ST'(perm[s]);
      traffic('1, rd, D, g);
    end
    // two sources for the same destination: source 6 is refused (no data)
    rd = '0;
    rd[1] = 3'd5; rd[6] = 3'd5;
    traffic(N'(8'b0100_0010), rd, 0, g);
    chk(g[1] && !g[6], "priority to the lower source");
    // sources 0 and 4 need switch 0 of stage 1 in opposite states
    rd = '0;
    rd[0] = 3'd0; rd[4] = 3'd1;
    traffic(N'(8'b0001_0001), rd, 0, g);
    chk(g[0] && !g[4], "switch conflict refused");

    // 2. production test
    prod_mode = 1;
    @(negedge clk) tst_start = 1;
    @(negedge clk) tst_start = 0;
    while (!tst_done) @(negedge clk);
    chk(!tst_fail_p && !tst_fail_l, "production test passes");
    chk(tst_checks == 16'(2 * (3 * N - 2)) && tst_errors == '0, "production test check count");
    prod_mode = 0;

    // 3. on-line test
    ol_mode = 1;
    @(negedge clk) ol_start = 1;
    @(negedge clk) ol_start = 0;
    while (!ol_done) @(negedge clk);
    chk(ol_fail == '0, "on-line test passes");
    ol_mode = 0;

    // 4. normal traffic again
    for (int it = 0; it < 2; it++) begin
      int perm [N];
      for (int s = 0; s < N; s++) perm[s] = s;
      perm.shuffle();
      for (int s = 0; s < N; s++) rd[s] = ST'(perm[s]);
      traffic('1, rd, 2, g);
    end

    $display("mechanisms: tester P checks %0d, tester L checks %0d, on-line P checks %0d, on-line L checks %0d",
             n_tp, n_tl, n_op, n_ol);
    $display("mechanisms: sessions %0d, granted %0d, refused %0d, words %0d",
             n_sessions, n_granted, n_refused, n_words);
    chk(n_tp == 2 * N, "tester P checks");
    chk(n_tl == 4 * (N - 1), "tester L checks (Gray counter up and down)");
    chk(n_op > 0, "on-line P checks happened");
    chk(n_ol > 0, "on-line L checks happened");
    chk(n_granted > 0 && n_refused > 0, "grants and refusals happened");
    chk(n_words > 0 && n_sessions > 0, "sessions with data happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
