// Self-checking test of online_test_agent: n agents with their node ports,
// the centralized control and a MIN model that can hold a path delay fault.
// Fault free, every agent passes with the expected number of checks and
// with every session fully granted; a late destination line is caught by
// the agent of that destination in both schemes; a late control input of
// any switch is caught in the L scheme only.
module online_test_agent_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 4;
  localparam int unsigned D  = 4;
  localparam int unsigned ST = $clog2(N);
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] busy, done, fail, chk_p, chk_l, tx_wr, rx_rd, rx_empty, req_valid;
  logic [N-1:0] grant, tx_empty, send, recv, notify;
  logic [N-1:0][M-1:0] tx_wdata, rx_rdata, src, dst;
  logic [N-1:0][ST-1:0] req_dest, gray;
  logic [N-1:0][15:0] achecks, aerrors;
  logic [ST-1:0][N/2-1:0] ctrl;
  logic in_session, session_done;
  logic [1:0] mode;
  int unsigned slow_dst, slow_stage, slow_sw;
  int checks = 0, failures = 0;
  int np [N], nl [N];

  for (genvar s = 0; s < N; s++) begin : g_node
    logic tx_full;
    logic [2:0] rx_count;
    node_port #(.M(M), .DEPTH(D)) u_port (
      .clk, .rst_n, .tx_wr(tx_wr[s]), .tx_wdata(tx_wdata[s]), .tx_full,
      .rx_rd(rx_rd[s]), .rx_rdata(rx_rdata[s]), .rx_empty(rx_empty[s]), .rx_count,
      .send(send[s]), .tx_data(src[s]), .tx_empty(tx_empty[s]),
      .recv(recv[s]), .rx_in(dst[s]));
    online_test_agent #(.N_PORTS(N), .M(M)) dut (
      .clk, .rst_n, .node_id(ST'(s)), .start,
      .busy(busy[s]), .done(done[s]), .fail(fail[s]), .chk_p(chk_p[s]), .chk_l(chk_l[s]),
      .checks(achecks[s]), .errors(aerrors[s]), .gray(gray[s]),
      .tx_wr(tx_wr[s]), .tx_wdata(tx_wdata[s]), .rx_rd(rx_rd[s]), .rx_rdata(rx_rdata[s]),
      .rx_empty(rx_empty[s]), .req_valid(req_valid[s]), .req_dest(req_dest[s]),
      .grant(grant[s]), .session_done);
  end

  central_control #(.N_PORTS(N)) u_cc (
    .clk, .rst_n, .req_valid, .req_dest, .tx_empty, .sw_ctrl(ctrl), .grant,
    .rx_notify(notify), .send, .recv, .in_session, .session_done);

  slow_min #(.N_PORTS(N), .M(M)) u_net (
    .clk, .mode, .slow_dst, .slow_stage, .slow_sw, .src, .ctrl, .dst);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) for (int s = 0; s < N; s++) begin
    if (chk_p[s]) np[s] <= np[s] + 1;
    if (chk_l[s]) nl[s] <= nl[s] + 1;
  end

  task automatic run(output logic [N-1:0] f);
    for (int s = 0; s < N; s++) begin np[s] = 0; nl[s] = 0; end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done[0]) @(negedge clk);
    checks++; if (done != '1) failures++;   // all agents finish together
    f = fail;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] f;
    mode = 0; slow_dst = 0; slow_stage = 0; slow_sw = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(f);
    checks++; if (f != '0) failures++;
    for (int s = 0; s < N; s++) begin
      // P: n sessions of 4 words, the very first word unchecked
      checks++; if (np[s] != 4 * N - 1) failures++;
      // L: two vectors, 1 + 2(n-1) sessions of 2 words each
      checks++; if (nl[s] != 2 * 2 * (1 + 2 * (N - 1))) failures++;
      // plus one grant check per session
      checks++; if (achecks[s] != 16'(N + 4 * N - 1 + 2 * 3 * (1 + 2 * (N - 1)))) failures++;
      checks++; if (gray[s] != '0) failures++;
    end
    mode = 1;
    for (int d = 0; d < N; d++) begin
      slow_dst = d;
      run(f);
      checks++; if (f != (N'(1) << d)) begin failures++; $display("dst %0d fail %b", d, f); end
    end
    mode = 2;
    for (int st = 0; st < ST; st++)
      for (int k = 0; k < N / 2; k++) begin
        slow_stage = st; slow_sw = k;
        run(f);
        checks++; if (f == '0) begin failures++; $display("ctrl %0d/%0d missed", st, k); end
      end
    mode = 0;
    run(f);
    checks++; if (f != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
