// elink_phase_selector: phase-selection state machine of one channel.
//
// The sampler reports, once per bit, which phases of the delay line saw a
// data transition at the clock edge (edge flags e[k]).  A single bit period is
// noisy: the phases next to a transition are random and jitter moves it.  The
// machine therefore accumulates, per phase, how often it was flagged during a
// window of WINDOW bit periods that contained a transition, and at the end of
// the window takes every phase flagged at least 3/4 as often as the most
// flagged one as a data edge (the line spans 1.75 bits, so it can see the
// edges at both ends of a bit, 8 phases apart).  The best sampling phase is
// half a bit (4 phase steps) away from a data edge, i.e. edge +/- 4.
//
//   SEARCH  (start-up) picks the centre that lies in phases 4..11.  When
//           LOCK_WINDOWS further windows in a row agree with it (same point
//           of the bit within one phase step, see agree) the channel is
//           locked and goes to TRACK (automatic mode) or FROZEN (fixed phase
//           with automatic start-up).
//   TRACK   among the centres within phases 0..14, takes the nearest to the
//           current phase; moves one phase towards it per window if it is
//           less than half a bit away, otherwise jumps to it (the data moved
//           outside the delay range and a bit is slipped).
//   FROZEN  keeps the phase found at start-up.
//   STATIC  uses the phase given by static_phase.
// A change of mode restarts from STATIC or SEARCH.  The state and the
// selected phase are held in three copies with majority voting on every read,
// so a single upset register is outvoted and rewritten on the next cycle.
//
//   edges_valid/edges   from the sampler, one strobe per bit
//   mode, static_phase  configuration
//   phase_sel           phase in use
//   locked              automatic modes: lock confirmed; static mode: 1
//   power_save          the delay line may power down unused cells (STATIC
//                       and FROZEN)
//   window_done         one-cycle strobe at the end of each decision window
//
// The three modes, the 4..11 start-up window, the centring half a bit away
// from the edges, tracking over the 1.75 T_bit line and triple redundancy of
// the FSM follow the published description.  The window length, the 3/4-of-peak
// edge threshold, the lock count and the one-step-per-window tracking are this
// design's choices: the description asks only for an FSM that filters the
// randomness of edge detection and jitter.
`timescale 1ps/1ps
module elink_phase_selector
  import elink_pkg::*;
#(
  parameter int unsigned WINDOW       = 32,
  parameter int unsigned LOCK_WINDOWS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  edges_valid,
  input  logic [NUM_PHASES-1:0] edges,
  input  mode_e                 mode,
  input  logic [PHASE_W-1:0]    static_phase,
  output logic [PHASE_W-1:0]    phase_sel,
  output logic                  locked,
  output logic                  power_save,
  output logic                  window_done
);

  typedef enum logic [1:0] {
    S_STATIC = 2'd0,
    S_SEARCH = 2'd1,
    S_TRACK  = 2'd2,
    S_FROZEN = 2'd3
  } state_e;

  localparam int unsigned CW = $clog2(WINDOW + 1);
  localparam int unsigned LW = $clog2(LOCK_WINDOWS + 1);

  // ---- triplicated FSM registers ------------------------------------------
  logic [1:0]         st_q  [3];
  logic [PHASE_W-1:0] sel_q [3];
  logic [LW-1:0]      lk_q  [3];
  state_e             st_v;
  logic [PHASE_W-1:0] sel_v;
  logic [LW-1:0]      lk_v;

  assign st_v  = state_e'((st_q[0] & st_q[1]) | (st_q[0] & st_q[2]) | (st_q[1] & st_q[2]));
  assign sel_v = (sel_q[0] & sel_q[1]) | (sel_q[0] & sel_q[2]) | (sel_q[1] & sel_q[2]);
  assign lk_v  = (lk_q[0] & lk_q[1]) | (lk_q[0] & lk_q[2]) | (lk_q[1] & lk_q[2]);

  // ---- edge statistics ------------------------------------------------------
  logic [CW-1:0]         cnt [NUM_PHASES];
  logic [CW-1:0]         trans_cnt;
  logic                  any_edge;
  logic                  win_end;
  logic [NUM_PHASES-1:0] is_edge;    // phases judged to be data edges
  mode_e                 mode_q;

  assign any_edge = |edges;
  assign win_end  = edges_valid && any_edge && (trans_cnt == CW'(WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trans_cnt <= '0;
      for (int k = 0; k < NUM_PHASES; k++) cnt[k] <= '0;
    end else if (edges_valid && any_edge) begin
      if (win_end) begin
        trans_cnt <= '0;
        for (int k = 0; k < NUM_PHASES; k++) cnt[k] <= '0;
      end else begin
        trans_cnt <= trans_cnt + 1'b1;
        for (int k = 0; k < NUM_PHASES; k++) cnt[k] <= cnt[k] + CW'(edges[k]);
      end
    end
  end

  // a phase is an edge if it was flagged at least 3/4 as often as the most
  // flagged phase of the window (the phases next to an edge, flagged only
  // when their sample happened to resolve differently, stay below that)
  always_comb begin
    logic [CW:0] total [NUM_PHASES];
    logic [CW:0] peak;
    peak = '0;
    for (int k = 0; k < NUM_PHASES; k++) begin
      total[k] = {1'b0, cnt[k]} + (CW+1)'(edges[k]);
      if (total[k] > peak) peak = total[k];
    end
    for (int k = 0; k < NUM_PHASES; k++)
      is_edge[k] = (peak != '0) && ((4 * int'(total[k])) >= (3 * int'(peak)));
  end

  // ---- centre candidates ------------------------------------------------------
  logic                  init_found;
  logic [PHASE_W-1:0]    init_phase;
  logic                  trk_found;
  logic [PHASE_W-1:0]    trk_phase;

  always_comb begin
    int best_dd;
    int c;
    int dd;
    c          = 0;
    dd         = 0;
    init_found = 1'b0;
    init_phase = '0;
    trk_found  = 1'b0;
    trk_phase  = '0;
    best_dd  = 99;
    for (int k = 0; k < NUM_PHASES; k++) begin
      if (is_edge[k]) begin
        for (int s = -4; s <= 4; s += 8) begin
          c = k + s;
          if (c >= 0 && c < NUM_PHASES) begin
            if (!init_found && c >= INIT_MIN && c <= INIT_MAX) begin
              init_found = 1'b1;
              init_phase = PHASE_W'(c);
            end
            dd = (c > int'(sel_v)) ? c - int'(sel_v) : int'(sel_v) - c;
            if (dd < best_dd) begin
              best_dd = dd;
              trk_found = 1'b1;
              trk_phase = PHASE_W'(c);
            end
          end
        end
      end
    end
  end

  // A start-up decision agrees with the current phase if it is the same
  // sampling point within one phase step, counted modulo a bit period: an
  // edge lying between two phases can put the centre at either end of the
  // 4..11 range (e.g. 4 or 11), which is the same point in the bit.
  logic [2:0] init_diff;
  logic       agree;
  assign init_diff = 3'(init_phase - sel_v);
  assign agree     = (init_diff == 3'd0) || (init_diff == 3'd1) || (init_diff == 3'd7);

  // ---- next state -------------------------------------------------------------
  state_e             st_n;
  logic [PHASE_W-1:0] sel_n;
  logic [LW-1:0]      lk_n;

  always_comb begin
    st_n  = st_v;
    sel_n = sel_v;
    lk_n  = lk_v;
    if (mode != mode_q) begin
      st_n  = (mode == MODE_STATIC) ? S_STATIC : S_SEARCH;
      lk_n  = '0;
    end else begin
      unique case (st_v)
        S_STATIC: begin
          sel_n = static_phase;
          if (mode != MODE_STATIC) st_n = S_SEARCH;
        end
        S_SEARCH: if (win_end) begin
          if (init_found) begin
            sel_n = init_phase;
            if (agree) begin
              lk_n = lk_v + 1'b1;
              if (lk_v + 1'b1 >= LW'(LOCK_WINDOWS))
                st_n = (mode == MODE_FIXED_AUTO) ? S_FROZEN : S_TRACK;
            end else begin
              lk_n  = '0;
            end
          end else begin
            lk_n = '0;
          end
        end
        S_TRACK: if (win_end && trk_found) begin
          if (trk_phase > sel_v) begin
            if (trk_phase - sel_v < PHASE_W'(STEPS_PER_UI / 2)) sel_n = sel_v + 1'b1;
            else                                                sel_n = trk_phase;
          end else if (trk_phase < sel_v) begin
            if (sel_v - trk_phase < PHASE_W'(STEPS_PER_UI / 2)) sel_n = sel_v - 1'b1;
            else                                                sel_n = trk_phase;
          end
        end
        S_FROZEN: ;
        default: st_n = S_SEARCH;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        st_q[i]  <= 2'(S_STATIC);
        sel_q[i] <= PHASE_W'(INIT_MIN);
        lk_q[i]  <= '0;
      end
      mode_q <= MODE_STATIC;
    end else begin
      for (int i = 0; i < 3; i++) begin
        st_q[i]  <= 2'(st_n);
        sel_q[i] <= sel_n;
        lk_q[i]  <= lk_n;
      end
      mode_q <= mode;
    end
  end

  assign phase_sel   = sel_v;
  assign locked      = (st_v == S_STATIC) || (st_v == S_TRACK) || (st_v == S_FROZEN);
  assign power_save  = (st_v == S_STATIC) || (st_v == S_FROZEN);
  assign window_done = win_end;

endmodule
