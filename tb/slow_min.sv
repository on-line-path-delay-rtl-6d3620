// Test-only Omega MIN with an injectable path delay fault.
//
// Wraps omega_min. mode 0: fault free. mode 1: destination line slow_dst is
// late by one clock period (it shows the value of the previous period), so
// every path ending there is too slow. mode 2: the control input of switch
// slow_sw of stage slow_stage acts one clock period late, so the paths that
// start at that control input are too slow.
module slow_min #(
  parameter int unsigned N_PORTS = 8,
  parameter int unsigned M       = 8,
  localparam int unsigned STAGES = $clog2(N_PORTS)
) (
  input  logic                             clk,
  input  logic [1:0]                       mode,
  input  int unsigned                      slow_dst,
  input  int unsigned                      slow_stage,
  input  int unsigned                      slow_sw,
  input  logic [N_PORTS-1:0][M-1:0]        src,
  input  logic [STAGES-1:0][N_PORTS/2-1:0] ctrl,
  output logic [N_PORTS-1:0][M-1:0]        dst
);
  logic [N_PORTS-1:0][M-1:0]        dst_raw;
  logic [STAGES-1:0][N_PORTS/2-1:0] ctrl_eff, ctrl_q;
  logic [M-1:0]                     dst_q;

  always_ff @(posedge clk) begin
    ctrl_q <= ctrl;
    dst_q  <= dst_raw[slow_dst];
  end

  always_comb begin
    ctrl_eff = ctrl;
    if (mode == 2'd2) ctrl_eff[slow_stage][slow_sw] = ctrl_q[slow_stage][slow_sw];
  end

  omega_min #(.N_PORTS(N_PORTS), .M(M)) u_min (.src, .ctrl(ctrl_eff), .dst(dst_raw));

  always_comb begin
    dst = dst_raw;
    if (mode == 2'd1) dst[slow_dst] = dst_q;
  end
endmodule
