// n x n Omega multistage interconnection network, one M-bit slice.
//
// N = log2(n) stages of n/2 min_switch instances. Source s enters the
// network on the perfect shuffle: the link from position p of one stage
// boundary goes to position rotl(p) of the next stage's inputs, and switch k
// of a stage takes input positions 2k (port 0) and 2k+1 (port 1). The outputs
// of the last stage go straight to the destinations, with no shuffle.
//
// ctrl[i][k] is the control line of switch k of stage i+1 (0 direct, 1 cross);
// a centralized controller drives every one of them. The network is purely
// combinational: a word on src reaches dst through N multiplexer levels.
// The structure is the standard Omega network; the port numbering of the
// switches inside a stage is this design's.
module omega_min #(
  parameter int unsigned N_PORTS = 8,   // n, a power of two >= 2
  parameter int unsigned M       = 8,   // bus width of one slice
  localparam int unsigned STAGES = $clog2(N_PORTS)
) (
  input  logic [N_PORTS-1:0][M-1:0]     src,
  input  logic [STAGES-1:0][N_PORTS/2-1:0] ctrl,
  output logic [N_PORTS-1:0][M-1:0]     dst
);
  import omega_pkg::*;

  if (N_PORTS < 2 || (N_PORTS & (N_PORTS - 1)) != 0) begin : g_bad_size
    $error("omega_min: N_PORTS must be a power of two, at least 2");
  end

  // lnk[i] is the boundary after stage i (lnk[0] = sources).
  logic [N_PORTS-1:0][M-1:0] lnk [STAGES+1];
  assign lnk[0] = src;

  for (genvar st = 0; st < STAGES; st++) begin : g_stage
    logic [N_PORTS-1:0][M-1:0] sin;   // stage inputs after the shuffle
    for (genvar p = 0; p < N_PORTS; p++) begin : g_shuffle
      assign sin[shuffle(p, STAGES)] = lnk[st][p];
    end
    for (genvar k = 0; k < N_PORTS / 2; k++) begin : g_sw
      min_switch #(.M(M)) u_sw (
        .x0(sin[2*k]),
        .x1(sin[2*k+1]),
        .c (ctrl[st][k]),
        .y0(lnk[st+1][2*k]),
        .y1(lnk[st+1][2*k+1])
      );
    end
  end

  assign dst = lnk[STAGES];

endmodule
