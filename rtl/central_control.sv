// Centralized control of the Omega MIN and of its communication sessions.
//
// Session timing, all on the common clock:
//   edge 1  the requests (req_valid, req_dest) are registered;
//   edge 2  the switch settings and the grant / receive notifications are
//           registered: the MIN takes its new configuration;
//   edge 3+ every transfer cycle each granted source moves one word from its
//           transmit buffer onto the MIN (send) and each notified
//           destination stores the word on its MIN output (recv).
// The session ends with the cycle in which every granted transmit buffer is
// empty; that cycle still receives, so a destination stores K+1 words when
// the sources send K: first the word its source already held, seen through
// the new configuration, then the K new words. session_done pulses in the
// cycle after.
//
// Routing uses the destination tag: at stage i a word leaves on output port
// bit N-i of its destination, and the switch state is input port XOR output
// port. Requests are served in source order (source 0 first): a request is
// granted when every switch on its path is still free or already set to the
// state it needs; otherwise it is refused (grant low), which also covers two
// sources asking for the same destination. Switches no granted path uses
// keep their previous state, so the configuration is stable while no new
// requests arrive.
//
// The three-step session and the stable configuration are the method's; the
// destination-tag routing, the source-order priority and the end-of-session
// rule are this design's choices, as the method leaves them open.
module central_control #(
  parameter int unsigned N_PORTS = 8,
  localparam int unsigned STAGES = $clog2(N_PORTS)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [N_PORTS-1:0]                   req_valid,
  input  logic [N_PORTS-1:0][STAGES-1:0]       req_dest,
  input  logic [N_PORTS-1:0]                   tx_empty,
  output logic [STAGES-1:0][N_PORTS/2-1:0]     sw_ctrl,
  output logic [N_PORTS-1:0]                   grant,
  output logic [N_PORTS-1:0]                   rx_notify,
  output logic [N_PORTS-1:0]                   send,
  output logic [N_PORTS-1:0]                   recv,
  output logic                                 in_session,
  output logic                                 session_done
);

  typedef enum logic [1:0] {S_IDLE, S_CONF, S_XFER} state_t;
  state_t state;

  logic [N_PORTS-1:0]               req_q;
  logic [N_PORTS-1:0][STAGES-1:0]   dest_q;
  logic [STAGES-1:0][N_PORTS/2-1:0] cfg_d;
  logic [N_PORTS-1:0]               grant_d, notify_d;
  logic                             last_xfer;

  // Greedy conflict resolution and switch setting, in source order.
  always_comb begin
    logic [STAGES-1:0][N_PORTS/2-1:0] used;
    logic [STAGES-1:0][N_PORTS/2-1:0] need_c;
    logic [STAGES-1:0][N_PORTS/2-1:0] on_path;
    logic [STAGES-1:0]                pos;
    logic                             inp, outp, ok;
    int unsigned                      sw;
    cfg_d    = sw_ctrl;
    grant_d  = '0;
    notify_d = '0;
    used     = '0;
    for (int s = 0; s < N_PORTS; s++) begin
      on_path = '0;
      need_c  = '0;
      ok      = req_q[s];
      pos     = STAGES'(s);
      for (int st = 0; st < STAGES; st++) begin
        pos  = (pos << 1) | (pos >> (STAGES - 1));   // perfect shuffle
        inp  = pos[0];
        outp = dest_q[s][STAGES-1-st];
        sw   = int'(pos) >> 1;
        on_path[st][sw] = 1'b1;
        need_c[st][sw]  = inp ^ outp;
        if (used[st][sw] && (cfg_d[st][sw] != (inp ^ outp))) ok = 1'b0;
        pos[0] = outp;
      end
      if (ok) begin
        used    = used | on_path;
        cfg_d   = (cfg_d & ~on_path) | need_c;
        grant_d[s] = 1'b1;
        notify_d[dest_q[s]] = 1'b1;
      end
    end
  end

  assign in_session = (state == S_XFER);
  assign send       = in_session ? (grant & ~tx_empty) : '0;
  assign recv       = in_session ? rx_notify : '0;
  assign last_xfer  = in_session && ((grant & ~tx_empty) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      req_q        <= '0;
      dest_q       <= '0;
      sw_ctrl      <= '0;
      grant        <= '0;
      rx_notify    <= '0;
      session_done <= 1'b0;
    end else begin
      session_done <= 1'b0;
      unique case (state)
        S_IDLE: if (|req_valid) begin
          req_q  <= req_valid;
          dest_q <= req_dest;
          state  <= S_CONF;
        end
        S_CONF: begin
          sw_ctrl   <= cfg_d;
          grant     <= grant_d;
          rx_notify <= notify_d;
          state     <= S_XFER;
        end
        S_XFER: if (last_xfer) begin
          session_done <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Session rules: only requesting sources are granted, no destination is
  // granted twice, and the configuration does not move during a transfer.
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n)
    in_session |-> (grant & ~req_q) == '0);
  a_one_source_per_dest: assert property (@(posedge clk) disable iff (!rst_n)
    in_session |-> $countones(rx_notify) == $countones(grant));
  a_config_stable: assert property (@(posedge clk) disable iff (!rst_n)
    in_session && $past(in_session) |-> $stable(sw_ctrl));

endmodule
