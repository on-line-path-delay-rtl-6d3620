// On-line path delay fault test routine of one processor.
//
// One agent sits beside every processor's buffered ports; all agents start
// together and, since every step waits for the same network sessions, stay
// in step. Each agent keeps its own copy of the simulated up/down Gray
// counter and derives its request from it with dest_calc, so that all the
// requests of a session set every switch of stage i to c_i and never
// conflict.
//
// P paths: for each of the n counter values (counting up) the agent fills
// its transmit buffer with x, ~x, x (x: bit node_id of the test vector on all
// M lines) and runs one session; each word changes every source line, so
// both transitions travel along the n paths of the configuration.
// L paths: the agent sends one word per session while the counter runs from
// 0 up through all codes and back down, first with the test vector and then
// with its complement. The source data do not change between sessions, so
// the first word each destination stores in a session is the held data seen
// one period after the configuration changed: a transition that began at the
// stage control that the Gray step flipped.
//
// After a session the agent reads its receive buffer and compares every
// word with the expected value. With the stage controls all set from the
// counter value g, destination d receives the word sent by a source whose
// test vector bit is bit d xor parity(g), so the expected word is computed
// locally. The first word of the very first session (data held from before
// the test) is not checked. A refused request or a missing word also fails.
//
// start begins the test; done pulses at its end with fail (sticky until the
// next start) telling whether any check failed.
//
// The test steps, the simulated Gray counter and the destination procedure
// are the method's, where the processors carry them out themselves; doing it
// in a hardware agent, the word sequences and the local expected-value rule
// are this design's.
module online_test_agent #(
  parameter int unsigned N_PORTS = 8,
  parameter int unsigned M       = 8,
  localparam int unsigned STAGES = $clog2(N_PORTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [STAGES-1:0] node_id,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic              chk_p,     // a P word is checked at this edge
  output logic              chk_l,     // an L word is checked at this edge
  output logic [15:0]       checks,
  output logic [15:0]       errors,
  output logic [STAGES-1:0] gray,      // simulated counter value
  // processor-side ports of node_port
  output logic              tx_wr,
  output logic [M-1:0]      tx_wdata,
  output logic              rx_rd,
  input  logic [M-1:0]      rx_rdata,
  input  logic              rx_empty,
  // request to the centralized control
  output logic              req_valid,
  output logic [STAGES-1:0] req_dest,
  input  logic              grant,
  input  logic              session_done
);
  import omega_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_REQ, S_WAIT, S_DRAIN, S_NEXT} state_t;

  state_t     state;
  logic       phase_l;      // 0: P paths, 1: L paths
  logic       pol;          // L paths: 0 test vector, 1 its complement
  logic       dir_up;
  logic       set_sess;     // next L session sets the starting configuration
  logic       held_pol, held_valid;
  logic [1:0] wcnt;
  logic [2:0] rcnt;

  logic g_clr, g_en, g_up, g_at_max, g_at_min;

  gray_counter #(.W(STAGES)) u_gray (
    .clk, .rst_n, .clr(g_clr), .en(g_en), .up(g_up),
    .gray, .at_max(g_at_max), .at_min(g_at_min)
  );

  dest_calc #(.N_PORTS(N_PORTS)) u_dest (
    .src(node_id), .c(gray), .dest(req_dest)
  );

  logic [1:0] nwords;
  logic       my_bit, word_pol, exp_pol, chk_now, mismatch;
  assign nwords   = phase_l ? 2'd1 : 2'd3;
  assign my_bit   = test_vector_bit(int'(node_id));
  assign word_pol = phase_l ? pol : wcnt[0];
  assign tx_wdata = {M{my_bit ^ word_pol}};

  // Polarity of received word rcnt: 0 is the held word, then the sent words.
  always_comb begin
    if (rcnt == 3'd0)  exp_pol = held_pol;
    else if (phase_l)  exp_pol = pol;
    else               exp_pol = ~rcnt[0];   // words x, ~x, x arrive as 1, 2, 3
  end

  assign tx_wr     = (state == S_FILL);
  assign req_valid = (state == S_REQ);
  assign rx_rd     = (state == S_DRAIN) && !rx_empty;
  assign chk_now   = (state == S_DRAIN) && (rx_empty || rcnt != 3'd0 || held_valid);
  assign mismatch  = rx_empty ||
                     (rx_rdata != {M{my_bit ^ parity(int'(gray)) ^ exp_pol}});
  assign chk_p     = chk_now && !phase_l;
  assign chk_l     = chk_now && phase_l;
  assign busy      = (state != S_IDLE);

  // Counter moves decided after a session.
  always_comb begin
    g_clr = 1'b0;
    g_en  = 1'b0;
    g_up  = 1'b1;
    if (state == S_IDLE && start) g_clr = 1'b1;
    else if (state == S_NEXT) begin
      if (!phase_l) begin
        if (g_at_max) g_clr = 1'b1;
        else          g_en  = 1'b1;
      end else if (set_sess) begin
        g_en = 1'b1;
      end else if (dir_up) begin
        g_en = 1'b1;
        g_up = !g_at_max;
      end else if (!g_at_min) begin
        g_en = 1'b1;
        g_up = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase_l    <= 1'b0;
      pol        <= 1'b0;
      dir_up     <= 1'b1;
      set_sess   <= 1'b0;
      held_pol   <= 1'b0;
      held_valid <= 1'b0;
      wcnt       <= '0;
      rcnt       <= '0;
      done       <= 1'b0;
      fail       <= 1'b0;
      checks     <= '0;
      errors     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          phase_l    <= 1'b0;
          pol        <= 1'b0;
          dir_up     <= 1'b1;
          set_sess   <= 1'b0;
          held_valid <= 1'b0;
          wcnt       <= '0;
          fail       <= 1'b0;
          checks     <= '0;
          errors     <= '0;
          state      <= S_FILL;
        end
        S_FILL: begin
          wcnt <= wcnt + 2'd1;
          if (wcnt == nwords - 2'd1) state <= S_REQ;
        end
        S_REQ: state <= S_WAIT;
        S_WAIT: if (session_done) begin
          checks <= checks + 16'd1;
          if (!grant) begin
            errors <= errors + 16'd1;
            fail   <= 1'b1;
          end
          rcnt  <= '0;
          state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (chk_now) begin
            checks <= checks + 16'd1;
            if (mismatch) begin
              errors <= errors + 16'd1;
              fail   <= 1'b1;
            end
          end
          rcnt <= rcnt + 3'd1;
          if (rx_empty || rcnt == 3'({1'b0, nwords})) begin
            held_pol   <= phase_l ? pol : 1'b0;
            held_valid <= 1'b1;
            state      <= S_NEXT;
          end
        end
        S_NEXT: begin
          wcnt  <= '0;
          state <= S_FILL;
          if (!phase_l) begin
            if (g_at_max) begin
              phase_l  <= 1'b1;
              pol      <= 1'b0;
              dir_up   <= 1'b1;
              set_sess <= 1'b1;
            end
          end else if (set_sess) begin
            set_sess <= 1'b0;
            dir_up   <= 1'b1;
          end else if (dir_up) begin
            if (g_at_max) dir_up <= 1'b0;
          end else if (g_at_min) begin
            if (!pol) begin
              pol      <= 1'b1;
              set_sess <= 1'b1;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
