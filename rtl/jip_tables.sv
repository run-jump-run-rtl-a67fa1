// jip_tables: the runner and the two IP jumpers, with migration between them.
//
// Lookup (lk_*, combinational): the branch filter first finds the first IP
// at or after lk_ip, within lk_ip's 64-byte line, that may be a branch. That
// IP is looked up in MJT-II, MJT-I and the SJT at once. A hit returns the
// jumper's predicted target (a trigger lives in only one table; MJT-II, then
// MJT-I, then SJT is the priority if it ever were in several). A miss means
// the filter's answer was a false positive and the runner continues at that
// IP + SEQ_STEP. When the filter finds no branch in the rest of the line, the
// runner moves to the start of the next line, so straight code is walked a
// line per lookup. The runner works on compressed IPs and does not cross into
// the next 64 KB region (that would need a different mapper entry):
// lk_seq_end flags a step that would, and the lookahead stops there.
//
// Training (tr_*, once per L1-I access of a branch with a non-zero target):
//   not in any table           -> inserted into the SJT
//   in the SJT, same target    -> nothing changes (NRU bit refreshed)
//   in the SJT, other target   -> migrated to MJT-I with both targets
//   in MJT-I, known target or a free slot -> MJT-I records the instance
//   in MJT-I, a 4th unique target -> migrated to MJT-II with all four
//   in MJT-II                  -> MJT-II records it (replacing its oldest
//                                 target once eight are in use)
// The migration rules are published; the initial confidence (1) and the array
// of targets given to a migrated entry are this design's choices: an entry
// coming from the SJT starts with [old, new] in its array, an entry coming
// from MJT-I keeps MJT-I's array with the new target appended.
// Table updates take effect at the next clock edge; a lookup in the same
// cycle sees the old contents.
module jip_tables
  import jip_pkg::*;
#(
  parameter int unsigned SJT_ENTRIES = 7800,
  parameter int unsigned M1_SETS     = 1024,
  parameter int unsigned M1_NT       = 3,
  parameter int unsigned M1_NH       = 8,
  parameter int unsigned M2_SETS     = 512,
  parameter int unsigned M2_NT       = 8,
  parameter int unsigned M2_NH       = 16,
  parameter int unsigned MJT_K       = 4,
  parameter int unsigned SEQ_STEP    = 4,
  parameter int unsigned BF_BITS     = 4096
) (
  input  logic clk,
  input  logic rst_n,
  // lookahead lookup
  input  logic lk_valid,
  input  cip_t lk_ip,
  output cip_t lk_next,      // target on a hit, next sequential IP otherwise
  output logic lk_sjt_hit,
  output logic lk_mjt_hit,
  output logic lk_seq_end,   // sequential step would leave the 64 KB region
  // training
  input  logic tr_valid,
  input  cip_t tr_ip,
  input  cip_t tr_target,
  // table activity, one-cycle pulses
  output logic ev_sjt_insert,
  output logic ev_to_mjt1,
  output logic ev_to_mjt2
);
  localparam int unsigned T1_W  = $clog2(M1_NT);
  localparam int unsigned T2_W  = $clog2(M2_NT);
  localparam int unsigned NC1_W = $clog2(M1_NT + 1);
  localparam int unsigned NC2_W = $clog2(M2_NT + 1);
  localparam int unsigned HC1_W = $clog2(M1_NH + 1);
  localparam int unsigned HC2_W = $clog2(M2_NH + 1);

  // ---------------- branch filter ----------------
  logic bf_found;
  cip_t bf_first;

  branch_filter #(.BITS(BF_BITS), .STEP(SEQ_STEP)) u_bf (
    .clk, .rst_n, .ins_valid(tr_valid), .ins_ip(tr_ip),
    .q_ip(lk_ip), .q_found(bf_found), .q_first(bf_first)
  );

  // ---------------- SJT ----------------
  cip_t tab_ip;
  assign tab_ip = bf_first;

  logic s_lk_hit, s_tr_hit, s_insert, s_remove;
  cip_t s_lk_tgt, s_tr_stored;

  sjt #(.ENTRIES(SJT_ENTRIES)) u_sjt (
    .clk, .rst_n,
    .lk_valid, .lk_ip(tab_ip), .lk_hit(s_lk_hit), .lk_target(s_lk_tgt),
    .tr_valid, .tr_ip, .tr_target, .tr_hit(s_tr_hit), .tr_stored(s_tr_stored),
    .wr_insert(s_insert), .wr_remove(s_remove)
  );

  // ---------------- MJT-I ----------------
  logic             m1_lk_hit, m1_tr_hit, m1_known, m1_upd, m1_rem, m1_ins;
  cip_t             m1_lk_tgt;
  logic [NC1_W-1:0] m1_ntgt, m1_ins_ntgt;
  cip_t             m1_tgt [M1_NT], m1_ins_tgt [M1_NT];
  logic [1:0]       m1_conf [M1_NT], m1_ins_conf [M1_NT];
  logic [T1_W-1:0]  m1_hist [M1_NH], m1_ins_hist [M1_NH];
  logic [HC1_W-1:0] m1_hcnt, m1_ins_hcnt;

  mjt #(.SETS(M1_SETS), .NT(M1_NT), .NH(M1_NH), .K(MJT_K)) u_mjt1 (
    .clk, .rst_n,
    .lk_valid, .lk_ip(tab_ip), .lk_hit(m1_lk_hit), .lk_target(m1_lk_tgt),
    .tr_valid, .tr_ip, .tr_target, .tr_hit(m1_tr_hit), .tr_known(m1_known),
    .rd_ntgt(m1_ntgt), .rd_tgt(m1_tgt), .rd_conf(m1_conf), .rd_hist(m1_hist),
    .rd_hcnt(m1_hcnt),
    .wr_update(m1_upd), .wr_remove(m1_rem), .wr_install(m1_ins),
    .ins_ntgt(m1_ins_ntgt), .ins_tgt(m1_ins_tgt), .ins_conf(m1_ins_conf),
    .ins_hist(m1_ins_hist), .ins_hcnt(m1_ins_hcnt)
  );

  // ---------------- MJT-II ----------------
  logic             m2_lk_hit, m2_tr_hit, m2_known, m2_upd, m2_ins;
  cip_t             m2_lk_tgt;
  logic [NC2_W-1:0] m2_ntgt, m2_ins_ntgt;
  cip_t             m2_tgt [M2_NT], m2_ins_tgt [M2_NT];
  logic [1:0]       m2_conf [M2_NT], m2_ins_conf [M2_NT];
  logic [T2_W-1:0]  m2_hist [M2_NH], m2_ins_hist [M2_NH];
  logic [HC2_W-1:0] m2_hcnt, m2_ins_hcnt;

  mjt #(.SETS(M2_SETS), .NT(M2_NT), .NH(M2_NH), .K(MJT_K)) u_mjt2 (
    .clk, .rst_n,
    .lk_valid, .lk_ip(tab_ip), .lk_hit(m2_lk_hit), .lk_target(m2_lk_tgt),
    .tr_valid, .tr_ip, .tr_target, .tr_hit(m2_tr_hit), .tr_known(m2_known),
    .rd_ntgt(m2_ntgt), .rd_tgt(m2_tgt), .rd_conf(m2_conf), .rd_hist(m2_hist),
    .rd_hcnt(m2_hcnt),
    .wr_update(m2_upd), .wr_remove(1'b0), .wr_install(m2_ins),
    .ins_ntgt(m2_ins_ntgt), .ins_tgt(m2_ins_tgt), .ins_conf(m2_ins_conf),
    .ins_hist(m2_ins_hist), .ins_hcnt(m2_ins_hcnt)
  );

  // ---------------- lookup ----------------
  // next sequential IP: after a false positive, or the next line's start
  logic [LOWER_W:0] seq_low;
  always_comb begin
    if (bf_found) seq_low = {1'b0, bf_first[LOWER_W-1:0]} + (LOWER_W+1)'(SEQ_STEP);
    else          seq_low = {1'b0, lk_ip[LOWER_W-1:LINE_OFF_W], {LINE_OFF_W{1'b0}}}
                            + (LOWER_W+1)'(1 << LINE_OFF_W);
  end

  always_comb begin
    lk_sjt_hit = 1'b0;
    lk_mjt_hit = 1'b0;
    lk_seq_end = 1'b0;
    if (!bf_found) begin
      lk_next    = {lk_ip[CIP_W-1:LOWER_W], seq_low[LOWER_W-1:0]};
      lk_seq_end = lk_valid && seq_low[LOWER_W];
    end else if (m2_lk_hit) begin
      lk_next    = m2_lk_tgt;
      lk_mjt_hit = 1'b1;
    end else if (m1_lk_hit) begin
      lk_next    = m1_lk_tgt;
      lk_mjt_hit = 1'b1;
    end else if (s_lk_hit) begin
      lk_next    = s_lk_tgt;
      lk_sjt_hit = 1'b1;
    end else begin
      lk_next    = {lk_ip[CIP_W-1:LOWER_W], seq_low[LOWER_W-1:0]};
      lk_seq_end = lk_valid && seq_low[LOWER_W];
    end
  end

  // ---------------- training and migration ----------------
  always_comb begin
    s_insert = 1'b0;
    s_remove = 1'b0;
    m1_upd   = 1'b0;
    m1_rem   = 1'b0;
    m1_ins   = 1'b0;
    m2_upd   = 1'b0;
    m2_ins   = 1'b0;
    if (tr_valid) begin
      if (m2_tr_hit) begin
        m2_upd = 1'b1;
      end else if (m1_tr_hit) begin
        if (m1_known || m1_ntgt < NC1_W'(M1_NT)) begin
          m1_upd = 1'b1;
        end else begin
          m1_rem = 1'b1;
          m2_ins = 1'b1;
        end
      end else if (s_tr_hit) begin
        if (s_tr_stored != tr_target) begin
          s_remove = 1'b1;
          m1_ins   = 1'b1;
        end
      end else begin
        s_insert = 1'b1;
      end
    end
  end

  // entry given to MJT-I on migration from the SJT: targets [old, new]
  always_comb begin
    m1_ins_ntgt = NC1_W'(2);
    m1_ins_hcnt = HC1_W'(2);
    for (int unsigned t = 0; t < M1_NT; t++) begin
      m1_ins_tgt[t]  = (t == 0) ? s_tr_stored : tr_target;
      m1_ins_conf[t] = (t < 2) ? 2'd1 : 2'd0;
    end
    for (int unsigned h = 0; h < M1_NH; h++) m1_ins_hist[h] = '0;
    m1_ins_hist[M1_NH-2] = T1_W'(0);
    m1_ins_hist[M1_NH-1] = T1_W'(1);
  end

  // entry given to MJT-II on migration from MJT-I: its targets plus the new one
  always_comb begin
    m2_ins_ntgt = NC2_W'(M1_NT + 1);
    for (int unsigned t = 0; t < M2_NT; t++) begin
      if (t < M1_NT) begin
        m2_ins_tgt[t]  = m1_tgt[t];
        m2_ins_conf[t] = m1_conf[t];
      end else if (t == M1_NT) begin
        m2_ins_tgt[t]  = tr_target;
        m2_ins_conf[t] = 2'd1;
      end else begin
        m2_ins_tgt[t]  = '0;
        m2_ins_conf[t] = 2'd0;
      end
    end
    for (int unsigned h = 0; h < M2_NH; h++) m2_ins_hist[h] = '0;
    for (int unsigned h = 0; h < M1_NH; h++)
      m2_ins_hist[M2_NH-1-M1_NH+h] = T2_W'(m1_hist[h]);
    m2_ins_hist[M2_NH-1] = T2_W'(M1_NT);
    if (int'(m1_hcnt) + 1 > int'(M2_NH)) m2_ins_hcnt = HC2_W'(M2_NH);
    else                                 m2_ins_hcnt = HC2_W'(m1_hcnt) + 1'b1;
  end

  assign ev_sjt_insert = s_insert;
  assign ev_to_mjt1    = m1_ins;
  assign ev_to_mjt2    = m2_ins;

endmodule
