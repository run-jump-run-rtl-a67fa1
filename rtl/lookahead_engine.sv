// lookahead_engine: walks the predicted control flow and issues prefetches.
//
// Main lookahead. An L1-I access starts a walk from the access IP, unless
// the access falls in one of the last PATH_LINES (16) lines the running walk
// went through: the access then confirms the predicted path, and the walk
// goes on from where it is with a fresh depth and degree budget.
// Each cycle the engine looks up its current IP in the JIP tables once and
// moves to the returned IP: a jumper's target on a hit, otherwise the
// runner's next IP (after the next possible branch of the line, or the next
// line's start). When the new IP lies in another cache line than the
// current one, that line is a prefetch candidate; the Recent Prefetch Queue
// (RPQ) drops it if it was prefetched recently, otherwise it is sent out and
// counts towards the degree. The walk ends after MAX_DEPTH (260) lookups or
// DEGREE (7) prefetches, as published. If the access IP hit in the temporal
// table, its follower's line is prefetched first, in the cycle before the
// first lookup, and does not count towards the degree.
//
// Extended lookahead. When the walk has ended, no access came for two cycles
// and two cycles have passed since the last prefetch (last-prefetch-cycle),
// the engine runs three more rounds (remaining-lookahead-cycles = 3) with a
// degree of one each. Every round starts from one of two IPs: the last
// temporal-table target IP or the last prefetched IP. A 9-bit saturating
// LAP-confidence counter, initialised to 256, picks the temporal path while it
// is at least 256 (favouring that path). Lines prefetched by a round are
// pushed into that path's LAPRQ; an L1-I hit on a line of the temporal path's
// LAPRQ adds two to the counter, one on the other path's LAPRQ subtracts one.
// The counter returns to 256 every 256 accesses (8-bit access counter). An
// access aborts the extended lookahead and starts a new main walk.
//
// Published: depth, degree, the two-cycle waits, three extended rounds of
// degree one, the LAP counter's width, start value, steps and period, the
// two LAPRQs and the registers of the hardware budget. This design's own:
// one table lookup per clock cycle (the published model looks the whole
// depth up at once), which is why a confirmed walk is continued rather
// than restarted, along the lines of the published suggestion to skip table
// accesses while L1-I accesses follow the predicted path; the 16-line path
// window that decides this is this design's. "A cycle" of the extended
// lookahead becomes a round of lookups here; a round that followed a path moves that path's start IP
// to the IP it prefetched, so the next round goes further along it; the
// choice between paths when only one start IP is known; a candidate is only
// formed when the line changes. Prefetches leave through a one-entry output
// register with a valid/ready handshake; while it is full and not accepted
// the engine stalls. All outputs are registered or depend only on state and
// the same-cycle table and RPQ answers.
module lookahead_engine
  import jip_pkg::*;
#(
  parameter int unsigned MAX_DEPTH  = 260,
  parameter int unsigned DEGREE     = 7,
  parameter int unsigned EXT_ROUNDS = 3,
  parameter int unsigned EXT_WAIT   = 2,
  parameter int unsigned LAP_INIT   = 256,
  parameter int unsigned LAP_PERIOD = 256,
  parameter int unsigned PATH_LINES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // L1-I access (compressed IP), with its temporal-table answer
  input  logic        acc_valid,
  input  cip_t        acc_cip,
  input  logic        acc_hit,
  input  logic        tt_hit,
  input  cip_t        tt_follower,
  // LAPRQ answers for the access line
  input  logic        laprq_tt_hit,
  input  logic        laprq_lp_hit,
  output logic        laprq_clr,
  output logic        laprq_tt_push,
  output logic        laprq_lp_push,
  output cline_t      laprq_line,
  // JIP tables lookup
  output logic        lk_valid,
  output cip_t        lk_ip,
  input  cip_t        lk_next,
  input  logic        lk_sjt_hit,
  input  logic        lk_mjt_hit,
  input  logic        lk_seq_end,
  // RPQ
  output cline_t      rpq_line,
  input  logic        rpq_hit,
  output logic        rpq_push,
  // prefetch out (line-aligned compressed IP)
  output logic        pf_valid,
  output cip_t        pf_cip,
  input  logic        pf_ready,
  // status
  output logic [8:0]  lap_conf,
  output jip_events_t ev
);
  localparam int unsigned DEP_W = $clog2(MAX_DEPTH + 1);
  localparam int unsigned DEG_W = $clog2(DEGREE + 1);
  localparam int unsigned REM_W = $clog2(EXT_ROUNDS + 1);
  localparam int unsigned ACC_W = $clog2(LAP_PERIOD);

  typedef enum logic [1:0] {S_IDLE, S_MAIN, S_EXT} state_e;

  state_e             state_q;
  cip_t               cur_q;
  logic [DEP_W-1:0]   depth_q;
  logic [DEG_W-1:0]   degree_q;
  logic               tt_pend_q;
  cip_t               last_pf_ip_q, last_tt_ip_q;
  logic               last_pf_ok_q, last_tt_ok_q;
  logic [63:0]        cycle_q, last_pf_cycle_q;
  logic [1:0]         since_acc_q;
  logic               ext_armed_q;
  logic [REM_W-1:0]   rem_q;
  lap_path_e          path_q;
  logic [8:0]         lap_q;
  logic [ACC_W-1:0]   acc_cnt_q;
  logic               pf_valid_q;
  cip_t               pf_cip_q;
  cline_t             walk_q [PATH_LINES];
  logic [PATH_LINES-1:0] walk_ok_q;

  assign pf_valid = pf_valid_q;
  assign pf_cip   = pf_cip_q;
  assign lap_conf = lap_q;

  // ---------------- one step of the walk ----------------
  logic   busy, stalled, out_free, step, tt_issue_cyc;
  logic   cand, issue, round_end;
  cline_t cand_line;
  logic   deg_lim;
  logic   on_path, line_cross;

  assign busy         = (state_q != S_IDLE) && (!acc_valid || on_path);
  assign out_free     = !pf_valid_q || pf_ready;
  assign stalled      = busy && !out_free;
  assign tt_issue_cyc = busy && out_free && state_q == S_MAIN && tt_pend_q;
  assign step         = busy && out_free && !tt_issue_cyc;

  assign lk_valid = step;
  assign lk_ip    = cur_q;

  always_comb begin
    cand      = 1'b0;
    cand_line = cline_of(lk_next);
    if (tt_issue_cyc) begin
      cand      = 1'b1;
      cand_line = cline_of(last_tt_ip_q);
    end else if (step && !lk_seq_end) begin
      cand = cline_of(lk_next) != cline_of(cur_q);
    end
  end

  assign rpq_line = cand_line;
  assign issue    = cand && !rpq_hit;
  assign rpq_push = issue;

  assign deg_lim   = (state_q == S_EXT) ? (issue && !tt_issue_cyc)
                   : (issue && degree_q == DEG_W'(DEGREE - 1));
  assign round_end = step && (lk_seq_end || deg_lim || depth_q == DEP_W'(MAX_DEPTH - 1));

  assign laprq_line    = cand_line;
  assign laprq_tt_push = issue && state_q == S_EXT && path_q == PATH_TT;
  assign laprq_lp_push = issue && state_q == S_EXT && path_q == PATH_LAST_PF;
  assign laprq_clr     = acc_valid && acc_hit;

  // ---------------- walk continuation ----------------
  // An access to a line the current main walk has already passed through
  // confirms the walk: it keeps its position and gets a new depth and degree
  // budget instead of starting over from the access IP.
  always_comb begin
    on_path = 1'b0;
    for (int unsigned i = 0; i < PATH_LINES; i++)
      if (walk_ok_q[i] && walk_q[i] == cline_of(acc_cip)) on_path = 1'b1;
    on_path = on_path && state_q != S_EXT;
  end
  assign line_cross = step && state_q == S_MAIN && !lk_seq_end
                   && cline_of(lk_next) != cline_of(cur_q);

  // ---------------- extended lookahead start ----------------
  logic      ext_go, next_round;
  lap_path_e pick;
  logic      pick_ok;
  always_comb begin
    pick_ok = last_tt_ok_q || last_pf_ok_q;
    if (last_tt_ok_q && (lap_q >= 9'(LAP_INIT) || !last_pf_ok_q)) pick = PATH_TT;
    else                                                          pick = PATH_LAST_PF;
  end
  assign ext_go = !acc_valid && state_q == S_IDLE && ext_armed_q && pick_ok
               && since_acc_q >= 2'(EXT_WAIT)
               && (cycle_q - last_pf_cycle_q) >= 64'(EXT_WAIT);
  assign next_round = state_q == S_EXT && round_end && rem_q > REM_W'(1);

  // ---------------- LAP confidence ----------------
  logic lap_inc, lap_dec, lap_rst;
  assign lap_inc = acc_valid && acc_hit && laprq_tt_hit;
  assign lap_dec = acc_valid && acc_hit && laprq_lp_hit;
  assign lap_rst = acc_valid && acc_cnt_q == ACC_W'(LAP_PERIOD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q         <= S_IDLE;
      cur_q           <= '0;
      depth_q         <= '0;
      degree_q        <= '0;
      tt_pend_q       <= 1'b0;
      last_pf_ip_q    <= '0;
      last_tt_ip_q    <= '0;
      last_pf_ok_q    <= 1'b0;
      last_tt_ok_q    <= 1'b0;
      cycle_q         <= '0;
      last_pf_cycle_q <= '0;
      since_acc_q     <= '0;
      ext_armed_q     <= 1'b0;
      rem_q           <= '0;
      path_q          <= PATH_TT;
      lap_q           <= 9'(LAP_INIT);
      acc_cnt_q       <= '0;
      pf_valid_q      <= 1'b0;
      pf_cip_q        <= '0;
      walk_ok_q       <= '0;
      for (int unsigned i = 0; i < PATH_LINES; i++) walk_q[i] <= '0;
    end else begin
      // lines of the main walk, newest first
      if (acc_valid && !on_path) begin
        walk_ok_q    <= PATH_LINES'(1);
        walk_q[0]    <= cline_of(acc_cip);
      end else if (line_cross) begin
        walk_ok_q    <= {walk_ok_q[PATH_LINES-2:0], 1'b1};
        walk_q[0]    <= cline_of(lk_next);
        for (int unsigned i = 1; i < PATH_LINES; i++) walk_q[i] <= walk_q[i-1];
      end
      cycle_q <= cycle_q + 64'd1;
      if (pf_valid_q && pf_ready) pf_valid_q <= 1'b0;
      if (issue) begin
        pf_valid_q      <= 1'b1;
        pf_cip_q        <= {cand_line, LINE_OFF_W'(0)};
        last_pf_cycle_q <= cycle_q;
      end

      // LAP confidence and access counter
      if (acc_valid) acc_cnt_q <= acc_cnt_q + 1'b1;
      if (lap_rst) begin
        lap_q <= 9'(LAP_INIT);
      end else if (lap_inc && !lap_dec) begin
        lap_q <= (lap_q >= 9'd510) ? 9'd511 : lap_q + 9'd2;
      end else if (lap_dec && !lap_inc) begin
        lap_q <= (lap_q == 9'd0) ? 9'd0 : lap_q - 9'd1;
      end else if (lap_inc && lap_dec) begin
        lap_q <= (lap_q == 9'd511) ? 9'd511 : lap_q + 9'd1;
      end

      if (acc_valid && !on_path) begin
        // an access off the walked path restarts everything from its IP
        state_q     <= S_MAIN;
        cur_q       <= acc_cip;
        depth_q     <= '0;
        degree_q    <= '0;
        tt_pend_q   <= tt_hit;
        since_acc_q <= '0;
        ext_armed_q <= 1'b1;
        rem_q       <= '0;
        if (tt_hit) begin
          last_tt_ip_q <= tt_follower;
          last_tt_ok_q <= 1'b1;
        end
      end else begin
        if (!acc_valid && since_acc_q != 2'd3) since_acc_q <= since_acc_q + 2'd1;
        if (tt_issue_cyc) tt_pend_q <= 1'b0;
        if (step) begin
          cur_q   <= lk_next;
          depth_q <= depth_q + 1'b1;
          if (issue) begin
            degree_q <= degree_q + 1'b1;
            if (state_q == S_EXT && path_q == PATH_TT) begin
              last_tt_ip_q <= lk_next;
            end else begin
              last_pf_ip_q <= lk_next;
              last_pf_ok_q <= 1'b1;
            end
          end
        end
        if (ext_go) begin
          state_q     <= S_EXT;
          ext_armed_q <= 1'b0;
          rem_q       <= REM_W'(EXT_ROUNDS);
          path_q      <= pick;
          cur_q       <= (pick == PATH_TT) ? last_tt_ip_q : last_pf_ip_q;
          depth_q     <= '0;
          degree_q    <= '0;
        end else if (round_end) begin
          if (next_round) begin
            // next round picks its path again, from the updated start IPs
            rem_q    <= rem_q - 1'b1;
            depth_q  <= '0;
            degree_q <= '0;
            path_q   <= pick;
            if (pick == PATH_TT) cur_q <= (issue && path_q == PATH_TT) ? lk_next : last_tt_ip_q;
            else                 cur_q <= (issue && path_q == PATH_LAST_PF) ? lk_next : last_pf_ip_q;
          end else begin
            state_q <= S_IDLE;
            rem_q   <= '0;
          end
        end
        if (acc_valid) begin
          // an access on the walked path: the walk goes on with a new budget
          state_q     <= S_MAIN;
          depth_q     <= '0;
          degree_q    <= '0;
          tt_pend_q   <= tt_hit || (tt_pend_q && !tt_issue_cyc);
          since_acc_q <= '0;
          ext_armed_q <= 1'b1;
          if (tt_hit) begin
            last_tt_ip_q <= tt_follower;
            last_tt_ok_q <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- events ----------------
  always_comb begin
    ev                 = '0;
    ev.lookahead_start = acc_valid && !on_path;
    ev.path_resume     = acc_valid && on_path;
    ev.depth_stop      = round_end && !deg_lim && !lk_seq_end && depth_q == DEP_W'(MAX_DEPTH - 1);
    ev.degree_stop     = round_end && deg_lim && state_q == S_MAIN;
    ev.rpq_filtered    = cand && rpq_hit;
    ev.tt_prefetch     = tt_issue_cyc && issue;
    ev.ext_start       = ext_go;
    ev.ext_round_tt    = (ext_go && pick == PATH_TT) || (next_round && pick == PATH_TT);
    ev.ext_round_lp    = (ext_go && pick == PATH_LAST_PF) || (next_round && pick == PATH_LAST_PF);
    ev.ext_abort       = acc_valid && state_q == S_EXT;
    ev.lap_inc         = lap_inc;
    ev.lap_dec         = lap_dec;
    ev.lap_reset       = lap_rst;
    ev.stall           = stalled;
    ev.jump_sjt        = step && lk_sjt_hit;
    ev.jump_mjt        = step && lk_mjt_hit;
    ev.run_seq         = step && !lk_sjt_hit && !lk_mjt_hit;
  end

  // a prefetch waiting in the output register stays put until accepted
  property p_pf_hold;
    @(posedge clk) disable iff (!rst_n) pf_valid && !pf_ready |=> pf_valid && $stable(pf_cip);
  endproperty
  a_pf_hold: assert property (p_pf_hold);

endmodule
