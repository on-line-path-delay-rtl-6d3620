// Sequencer of the low-cost production tester.
//
// After start it runs the two test schemes back to back and then raises done.
//
// P paths (source to destination). The Gray counter starts at 0 and moves up
// one code every five clock periods. Within the five periods of one
// configuration: period 1 lets the new configuration settle, period 2 holds
// the vector, periods 3 and 4 apply its complement and the vector again, and
// the response captured at the start of periods 4 and 5 is checked during
// those two periods (both transitions at every source). 2n checks in all.
// The T flip-flops toggle only at the starts of periods 3 and 4 and hold
// otherwise, so every transition starts from a value the sources have held
// for several periods; toggling at every edge would let a path that is late
// by a whole period pass, since its late output would still alternate.
//
// L paths (from switch control inputs). The sources hold one of the two
// complementary vectors; after two settling periods the Gray counter changes
// every two periods, first up through all codes and then down again. Every
// step flips one stage control and, with these vectors, every destination, so
// the response captured at the start of the second period of a pair must be
// the complement of the one before. The T flip-flops then toggle once to the
// other vector and the up/down pass repeats. 4(n-1) checks in all.
//
// A check compares the 2-rail checker output: z0 == z1 is a failed check.
// The checker is sampled at the clock edge that ends a check period (the
// description samples it half-way through that period; in a synchronous
// design the value is the same). fail_p / fail_l are sticky until the next
// start; checks and errors count the checks made and failed.
module tester_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // Gray counter
  output logic        g_clr,
  output logic        g_en,
  output logic        g_up,
  input  logic        g_at_max,
  input  logic        g_at_min,
  // T flip-flops and capture flip-flops
  output logic        t_load,
  output logic        t_en,
  output logic        cap_clr,
  // 2-rail checker output
  input  logic        z0,
  input  logic        z1,
  // status
  output logic        busy,
  output logic        done,
  output logic        chk_p,      // a P check is made at this edge
  output logic        chk_l,      // an L check is made at this edge
  output logic        fail_p,
  output logic        fail_l,
  output logic [15:0] checks,
  output logic [15:0] errors
);

  typedef enum logic [1:0] {S_IDLE, S_P_RUN, S_L_SETTLE, S_L_RUN} state_t;

  state_t     state, state_d;
  logic [2:0] pc, pc_d;         // period 1..5 of a P configuration, as 0..4
  logic       lc, lc_d;         // first / second period of an L step
  logic       dir_up, dir_up_d;
  logic       lv, lv_d;         // 0: first vector, 1: complementary vector

  logic err;
  assign err = (z0 == z1);

  always_comb begin
    state_d  = state;
    pc_d     = pc;
    lc_d     = lc;
    dir_up_d = dir_up;
    lv_d     = lv;
    g_clr    = 1'b0;
    g_en     = 1'b0;
    g_up     = 1'b1;
    t_load   = 1'b0;
    t_en     = 1'b0;
    cap_clr  = 1'b0;
    chk_p    = 1'b0;
    chk_l    = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (start) begin
          g_clr   = 1'b1;
          t_load  = 1'b1;
          cap_clr = 1'b1;
          pc_d    = '0;
          state_d = S_P_RUN;
        end
      end
      S_P_RUN: begin
        t_en  = (pc == 3'd1) || (pc == 3'd2);
        chk_p = (pc == 3'd3) || (pc == 3'd4);
        if (pc == 3'd4) begin
          pc_d = '0;
          if (g_at_max) begin
            g_clr    = 1'b1;
            t_load   = 1'b1;
            lc_d     = 1'b0;
            lv_d     = 1'b0;
            dir_up_d = 1'b1;
            state_d  = S_L_SETTLE;
          end else begin
            g_en = 1'b1;
          end
        end else begin
          pc_d = pc + 3'd1;
        end
      end
      S_L_SETTLE: begin
        lc_d = ~lc;
        if (lc) begin
          g_en    = 1'b1;
          state_d = S_L_RUN;
        end
      end
      S_L_RUN: begin
        lc_d = ~lc;
        if (lc) begin
          chk_l = 1'b1;
          if (dir_up) begin
            g_en = 1'b1;
            if (g_at_max) begin
              dir_up_d = 1'b0;
              g_up     = 1'b0;
            end
          end else if (!g_at_min) begin
            g_en = 1'b1;
            g_up = 1'b0;
          end else if (!lv) begin
            t_en     = 1'b1;
            lv_d     = 1'b1;
            dir_up_d = 1'b1;
            lc_d     = 1'b0;
            state_d  = S_L_SETTLE;
          end else begin
            state_d = S_IDLE;
          end
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pc     <= '0;
      lc     <= 1'b0;
      dir_up <= 1'b1;
      lv     <= 1'b0;
      done   <= 1'b0;
      fail_p <= 1'b0;
      fail_l <= 1'b0;
      checks <= '0;
      errors <= '0;
    end else begin
      state  <= state_d;
      pc     <= pc_d;
      lc     <= lc_d;
      dir_up <= dir_up_d;
      lv     <= lv_d;
      if (state == S_IDLE && start) begin
        done   <= 1'b0;
        fail_p <= 1'b0;
        fail_l <= 1'b0;
        checks <= '0;
        errors <= '0;
      end else begin
        if (chk_p || chk_l) begin
          checks <= checks + 16'd1;
          if (err) errors <= errors + 16'd1;
        end
        if (chk_p && err) fail_p <= 1'b1;
        if (chk_l && err) fail_l <= 1'b1;
        if (state == S_L_RUN && state_d == S_IDLE) done <= 1'b1;
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule
