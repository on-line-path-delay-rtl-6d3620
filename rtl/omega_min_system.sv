// Omega MIN interconnecting n processors, with its production tester and its
// on-line path delay fault test.
//
// One n x n Omega MIN (omega_min, M-bit slice) carries the traffic between
// the buffered ports (node_port) of n processors. Its switch settings come
// from the centralized control (central_control), which turns the
// processors' destination requests into a configuration and times the
// communication sessions.
//
// Two ways to test the network for path delay faults share it:
//  * prod_mode = 1 hands the MIN's sources and stage controls to the
//    low-cost production tester (low_cost_tester): Gray counter on the stage
//    controls, T flip-flops on the sources, capture flip-flops and a 2-rail
//    checker on the destinations.
//  * ol_mode = 1 hands every processor's ports and request lines to its
//    on-line test agent (online_test_agent), which applies the same test set
//    through ordinary communication sessions and checks the receive buffers.
// With both low, the processors (outside this module) use the ports.
//
// All logic runs on one clock with an asynchronous active-low reset.
// Sharing one network between the tester and the on-line system through
// prod_mode / ol_mode is this design's arrangement; the method treats the two
// as alternative ways to test the same network.
module omega_min_system #(
  parameter int unsigned N_PORTS = 8,   // n: the 8x8 network
  parameter int unsigned M       = 8,   // slice width (own choice)
  parameter int unsigned DEPTH   = 4,   // transmit buffer words (own choice)
  localparam int unsigned STAGES = $clog2(N_PORTS),
  localparam int unsigned AW     = (DEPTH < 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // production tester
  input  logic                             prod_mode,
  input  logic                             tst_start,
  output logic                             tst_busy,
  output logic                             tst_done,
  output logic                             tst_fail_p,
  output logic                             tst_fail_l,
  output logic                             tst_chk_p,
  output logic                             tst_chk_l,
  output logic [15:0]                      tst_checks,
  output logic [15:0]                      tst_errors,
  // on-line test
  input  logic                             ol_mode,
  input  logic                             ol_start,
  output logic                             ol_busy,
  output logic                             ol_done,
  output logic [N_PORTS-1:0]               ol_fail,
  output logic [N_PORTS-1:0]               ol_chk_p,
  output logic [N_PORTS-1:0]               ol_chk_l,
  // processor ports
  input  logic [N_PORTS-1:0]               proc_tx_wr,
  input  logic [N_PORTS-1:0][M-1:0]        proc_tx_wdata,
  output logic [N_PORTS-1:0]               proc_tx_full,
  input  logic [N_PORTS-1:0]               proc_rx_rd,
  output logic [N_PORTS-1:0][M-1:0]        proc_rx_rdata,
  output logic [N_PORTS-1:0]               proc_rx_empty,
  output logic [N_PORTS-1:0][AW:0]         proc_rx_count,
  input  logic [N_PORTS-1:0]               proc_req_valid,
  input  logic [N_PORTS-1:0][STAGES-1:0]   proc_req_dest,
  output logic [N_PORTS-1:0]               proc_grant,
  output logic                             in_session,
  output logic                             session_done
);

  // ---------------------------------------------------------------- network
  logic [N_PORTS-1:0][M-1:0]          min_src, min_dst;
  logic [STAGES-1:0][N_PORTS/2-1:0]   min_ctrl;

  logic [N_PORTS-1:0][M-1:0]          tst_src, node_src;
  logic [STAGES-1:0]                  tst_stage_ctrl;
  logic [STAGES-1:0][N_PORTS/2-1:0]   cc_ctrl;

  always_comb begin
    if (prod_mode) begin
      min_src = tst_src;
      for (int st = 0; st < STAGES; st++) min_ctrl[st] = {(N_PORTS/2){tst_stage_ctrl[st]}};
    end else begin
      min_src  = node_src;
      min_ctrl = cc_ctrl;
    end
  end

  omega_min #(.N_PORTS(N_PORTS), .M(M)) u_min (
    .src(min_src), .ctrl(min_ctrl), .dst(min_dst)
  );

  // ---------------------------------------------------------------- tester
  low_cost_tester #(.N_PORTS(N_PORTS), .M(M)) u_tester (
    .clk, .rst_n, .start(tst_start),
    .min_src(tst_src), .min_stage_ctrl(tst_stage_ctrl), .min_dst(min_dst),
    .busy(tst_busy), .done(tst_done), .chk_p(tst_chk_p), .chk_l(tst_chk_l),
    .fail_p(tst_fail_p), .fail_l(tst_fail_l),
    .checks(tst_checks), .errors(tst_errors)
  );

  // ---------------------------------------------------------- control, ports
  logic [N_PORTS-1:0]             req_valid, grant, tx_empty, send, recv, rx_notify_unused;
  logic [N_PORTS-1:0][STAGES-1:0] req_dest;
  logic [N_PORTS-1:0]             tx_wr, rx_rd, rx_empty;
  logic [N_PORTS-1:0][M-1:0]      tx_wdata, rx_rdata;

  central_control #(.N_PORTS(N_PORTS)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_dest, .tx_empty,
    .sw_ctrl(cc_ctrl), .grant, .rx_notify(rx_notify_unused),
    .send, .recv, .in_session, .session_done
  );

  logic [N_PORTS-1:0]             ag_busy, ag_done, ag_tx_wr, ag_rx_rd, ag_req_valid;
  logic [N_PORTS-1:0][M-1:0]      ag_tx_wdata;
  logic [N_PORTS-1:0][STAGES-1:0] ag_req_dest;

  for (genvar s = 0; s < N_PORTS; s++) begin : g_node
    logic [15:0]       ag_checks_unused, ag_errors_unused;
    logic [STAGES-1:0] ag_gray_unused;
    logic              tx_full;

    node_port #(.M(M), .DEPTH(DEPTH)) u_port (
      .clk, .rst_n,
      .tx_wr(tx_wr[s]), .tx_wdata(tx_wdata[s]), .tx_full,
      .rx_rd(rx_rd[s]), .rx_rdata(rx_rdata[s]), .rx_empty(rx_empty[s]),
      .rx_count(proc_rx_count[s]),
      .send(send[s]), .tx_data(node_src[s]), .tx_empty(tx_empty[s]),
      .recv(recv[s]), .rx_in(min_dst[s])
    );

    online_test_agent #(.N_PORTS(N_PORTS), .M(M)) u_agent (
      .clk, .rst_n,
      .node_id(STAGES'(s)),
      .start(ol_start && ol_mode),
      .busy(ag_busy[s]), .done(ag_done[s]), .fail(ol_fail[s]),
      .chk_p(ol_chk_p[s]), .chk_l(ol_chk_l[s]),
      .checks(ag_checks_unused), .errors(ag_errors_unused), .gray(ag_gray_unused),
      .tx_wr(ag_tx_wr[s]), .tx_wdata(ag_tx_wdata[s]),
      .rx_rd(ag_rx_rd[s]), .rx_rdata(rx_rdata[s]), .rx_empty(rx_empty[s]),
      .req_valid(ag_req_valid[s]), .req_dest(ag_req_dest[s]),
      .grant(grant[s]), .session_done
    );

    assign proc_tx_full[s] = tx_full;
  end

  assign tx_wr     = ol_mode ? ag_tx_wr     : proc_tx_wr;
  assign tx_wdata  = ol_mode ? ag_tx_wdata  : proc_tx_wdata;
  assign rx_rd     = ol_mode ? ag_rx_rd     : proc_rx_rd;
  assign req_valid = ol_mode ? ag_req_valid : proc_req_valid;
  assign req_dest  = ol_mode ? ag_req_dest  : proc_req_dest;

  assign proc_rx_rdata = rx_rdata;
  assign proc_rx_empty = rx_empty;
  assign proc_grant    = grant;
  assign ol_busy       = |ag_busy;
  assign ol_done       = &ag_done;

endmodule
