// Self-checking test of central_control.
//  * Requests computed from every Gray counter value: all granted, every
//    switch of stage i set to c_i, session timing (first send two edges after
//    the request edge, K+1 receive cycles, session_done the cycle after).
//  * Random requests: the grants must match a source-order greedy reference
//    computed here, every granted source must reach its destination through
//    the produced settings, and every refused one must not.
module central_control_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned ST = $clog2(N);
  localparam int unsigned K  = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_valid = '0, tx_empty, grant, rx_notify, send, recv;
  logic [N-1:0][ST-1:0] req_dest = '0;
  logic [ST-1:0][N/2-1:0] sw_ctrl;
  logic in_session, session_done;
  int remaining [N];
  int checks = 0, failures = 0;
  int n_refused = 0;

  central_control #(.N_PORTS(N)) dut (.*);
  always #5 clk = ~clk;

  for (genvar s = 0; s < N; s++) begin : g_buf
    assign tx_empty[s] = (remaining[s] == 0);
  end
  always @(posedge clk) for (int s = 0; s < N; s++) if (send[s]) remaining[s] <= remaining[s] - 1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Position reached from source s through settings cfg.
  function automatic int trace(input int s, input logic [ST-1:0][N/2-1:0] cfg);
    int p;
    p = s;
    for (int st = 0; st < ST; st++) begin
      p = ((p << 1) | (p >> (ST - 1))) & (N - 1);
      if (cfg[st][p/2]) p = p ^ 1;
    end
    return p;
  endfunction

  // Required state of every switch on the path of s to d: need[st][sw] = c+1.
  typedef int need_t [ST][N/2];
  function automatic need_t path_needs(input int s, input int d);
    need_t nd;
    int p, outp;
    foreach (nd[a, b]) nd[a][b] = 0;
    p = s;
    for (int st = 0; st < ST; st++) begin
      p = ((p << 1) | (p >> (ST - 1))) & (N - 1);
      outp = (d >> (ST - 1 - st)) & 1;
      nd[st][p/2] = ((p & 1) ^ outp) + 1;
      p = (p & ~1) | outp;
    end
    return nd;
  endfunction

  task automatic session(input logic [N-1:0] rv, input logic [N-1:0][ST-1:0] rd,
                         output int first_send, output int nrecv, output int done_at);
    int t;
    for (int s = 0; s < N; s++) remaining[s] = rv[s] ? K : 0;
    @(negedge clk);
    req_valid = rv; req_dest = rd;
    @(negedge clk);               // edge 1 sampled the requests
    req_valid = '0;
    t = 1; first_send = -1; nrecv = 0; done_at = -1;
    while (done_at < 0 && t < 50) begin
      if (send != '0 && first_send < 0) first_send = t;
      if (recv != '0) nrecv++;
      if (session_done) done_at = t;
      @(negedge clk);
      t++;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fs, nr, da;
    for (int s = 0; s < N; s++) remaining[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // conflict-free uniform configurations
    for (int g = 0; g < N; g++) begin
      logic [N-1:0][ST-1:0] rd;
      int rev;
      rev = 0;
      for (int i = 0; i < ST; i++) if (g[i]) rev |= 1 << (ST - 1 - i);
      for (int s = 0; s < N; s++) rd[s] = ST'(s ^ rev);
      session('1, rd, fs, nr, da);
      chk(grant == '1, "uniform: all granted");
      chk(rx_notify == '1, "uniform: all notified");
      for (int st = 0; st < ST; st++) chk(sw_ctrl[st] == {(N/2){g[st]}}, "uniform: stage state");
      chk(fs == 2, "first send two edges after the request edge");
      chk(nr == K + 1, "K+1 receive cycles");
      chk(da == fs + K + 1, "session_done the cycle after the last receive");
    end
    // random requests
    for (int it = 0; it < 200; it++) begin
      logic [N-1:0] rv, exp_grant;
      logic [N-1:0][ST-1:0] rd;
      int used [ST][N/2];
      rv = N'($urandom);
      if (rv == '0) rv[0] = 1'b1;
      for (int s = 0; s < N; s++) rd[s] = ST'($urandom);
      foreach (used[a, b]) used[a][b] = 0;
      exp_grant = '0;
      for (int s = 0; s < N; s++) if (rv[s]) begin
        need_t nd;
        logic ok;
        nd = path_needs(s, int'(rd[s]));
        ok = 1'b1;
        foreach (nd[a, b]) if (nd[a][b] != 0 && used[a][b] != 0 && used[a][b] != nd[a][b]) ok = 1'b0;
        if (ok) begin
          exp_grant[s] = 1'b1;
          foreach (nd[a, b]) if (nd[a][b] != 0) used[a][b] = nd[a][b];
        end
      end
      session(rv, rd, fs, nr, da);
      chk(grant == exp_grant, "greedy grants");
      for (int s = 0; s < N; s++) if (rv[s]) begin
        if (grant[s]) chk(trace(s, sw_ctrl) == int'(rd[s]), "granted source reaches its destination");
        else begin
          n_refused++;
          chk(trace(s, sw_ctrl) != int'(rd[s]), "refused source would not reach it");
        end
      end
    end
    chk(n_refused > 0, "some requests were refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
