// Low-cost production tester for path delay faults of an n x n Omega MIN.
//
// Made of: an up/down log2(n)-bit Gray counter whose bit i-1 drives the
// common control c_i of every switch of stage i; n*M T flip-flops driving the
// MIN sources with one of two complementary test vectors; 2*n*M D flip-flops
// capturing each MIN output in two consecutive periods; a 2-rail checker tree
// over those n*M flip-flop pairs; and the sequencer tester_ctrl. All parts run
// on the one test clock; the Gray counter's slower rate in the P scheme is an
// enable from the sequencer.
//
// Interface: start begins a complete test (P then L paths); done rises when it
// is over, with fail_p / fail_l telling which scheme saw a transition that
// did not reach the outputs within one clock period. A complete test takes
// 5n + 4 + 8(n-1) clock periods after the edge that samples start.
module low_cost_tester #(
  parameter int unsigned N_PORTS = 8,
  parameter int unsigned M       = 8,
  localparam int unsigned STAGES = $clog2(N_PORTS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic [N_PORTS-1:0][M-1:0] min_src,
  output logic [STAGES-1:0]         min_stage_ctrl,  // c_1 .. c_N
  input  logic [N_PORTS-1:0][M-1:0] min_dst,
  output logic                      busy,
  output logic                      done,
  output logic                      chk_p,
  output logic                      chk_l,
  output logic                      fail_p,
  output logic                      fail_l,
  output logic [15:0]               checks,
  output logic [15:0]               errors
);

  localparam int unsigned LINES = N_PORTS * M;

  logic g_clr, g_en, g_up, g_at_max, g_at_min;
  logic t_load, t_en, cap_clr;
  logic z0, z1;
  logic [LINES-1:0] q1, q2;

  gray_counter #(.W(STAGES)) u_gray (
    .clk, .rst_n, .clr(g_clr), .en(g_en), .up(g_up),
    .gray(min_stage_ctrl), .at_max(g_at_max), .at_min(g_at_min)
  );

  tff_vector_gen #(.N_PORTS(N_PORTS), .M(M)) u_tff (
    .clk, .rst_n, .load(t_load), .t(t_en), .q(min_src)
  );

  response_capture #(.LINES(LINES)) u_cap (
    .clk, .rst_n, .clr(cap_clr), .d(min_dst), .q1, .q2
  );

  two_rail_checker #(.PAIRS(LINES)) u_chk (
    .r0(q1), .r1(q2), .z0, .z1
  );

  tester_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .g_clr, .g_en, .g_up, .g_at_max, .g_at_min,
    .t_load, .t_en, .cap_clr,
    .z0, .z1,
    .busy, .done, .chk_p, .chk_l, .fail_p, .fail_l, .checks, .errors
  );

endmodule
