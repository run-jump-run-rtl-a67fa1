// jip_prefetcher: JIP, an L1 instruction-cache prefetcher built from a
// runner, two IP jumpers and a temporal table.
//
// Per L1-I access (acc.valid for one cycle):
//   1. the IP mapper compresses the access IP (and a branch's target) from
//      64 to 25 bits;
//   2. a branch with a non-zero predicted target trains the jump tables (SJT,
//      MJT-I, MJT-II) and the access pushes its IP into the Recent Access
//      Queue; on an L1-I miss the IP 25 accesses back becomes the leader of a
//      new temporal-table pair whose follower is the missing IP;
//   3. the temporal table is looked up with the access IP and the lookahead
//      engine restarts its walk from it;
//   4. each cycle afterwards the engine looks up one IP in the jump tables
//      (the first possible branch at or after its position, found by a Bloom
//      filter), follows the target or runs on in sequence, filters new lines
//      through the Recent Prefetch Queue and sends them out; when the L1-I is
//      idle it extends the walk along one of two paths chosen by the
//      LAP-confidence counter, whose accuracy the two LAPRQs track;
//   5. the reverse IP mapper turns the compressed line back into a 64-bit
//      line address for the L1-I prefetch queue (pf_valid/pf_ready).
// acc.target is the predicted-taken target of a branch, 0 when the branch is
// predicted not taken or mispredicted (then nothing is trained). pf_addr is
// 64-byte aligned and held while pf_valid is high and pf_ready low. ev
// carries one-cycle pulses of what happened, lap_conf the LAP counter.
// All sizes default to the published ones; the organisation into one lookup
// per cycle and the handshakes are this design's (see the submodules).
module jip_prefetcher
  import jip_pkg::*;
#(
  parameter int unsigned MAP_ENTRIES = 512,
  parameter int unsigned SJT_ENTRIES = 7800,
  parameter int unsigned M1_SETS     = 1024,
  parameter int unsigned M2_SETS     = 512,
  parameter int unsigned TT_ENTRIES  = 7150,
  parameter int unsigned RAQ_DEPTH   = 25,
  parameter int unsigned RPQ_ENTRIES = 64,
  parameter int unsigned LAPRQ_ENTRIES = 64,
  parameter int unsigned MAX_DEPTH   = 260,
  parameter int unsigned DEGREE      = 7,
  parameter int unsigned SEQ_STEP    = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  l1i_access_t  acc,
  output logic         pf_valid,
  output ip_t          pf_addr,
  input  logic         pf_ready,
  output logic [8:0]   lap_conf,
  output jip_events_t  ev
);
  // ---------------- IP mapper ----------------
  cip_t acc_cip, tgt_cip, pf_cip;
  logic ev_map_miss, train;

  assign train = acc.valid && acc.is_branch && acc.target != '0;

  ip_mapper #(.ENTRIES(MAP_ENTRIES)) u_mapper (
    .clk, .rst_n,
    .a_valid(acc.valid), .a_ip(acc.ip), .a_cip(acc_cip), .a_miss(ev_map_miss),
    .b_valid(train), .b_ip(acc.target), .b_cip(tgt_cip),
    .r_cip(pf_cip), .r_ip(pf_addr)
  );

  // ---------------- jump tables ----------------
  logic lk_valid, lk_sjt_hit, lk_mjt_hit, lk_seq_end;
  cip_t lk_ip, lk_next;
  logic ev_sjt_insert, ev_to_mjt1, ev_to_mjt2;

  jip_tables #(
    .SJT_ENTRIES(SJT_ENTRIES), .M1_SETS(M1_SETS), .M2_SETS(M2_SETS),
    .SEQ_STEP(SEQ_STEP)
  ) u_tables (
    .clk, .rst_n,
    .lk_valid, .lk_ip, .lk_next, .lk_sjt_hit, .lk_mjt_hit, .lk_seq_end,
    .tr_valid(train), .tr_ip(acc_cip), .tr_target(tgt_cip),
    .ev_sjt_insert, .ev_to_mjt1, .ev_to_mjt2
  );

  // ---------------- recent access queue and temporal table ----------------
  cip_t raq_head, tt_follower;
  logic raq_full, tt_hit, tt_ins;

  assign tt_ins = acc.valid && !acc.hit && raq_full;

  raq #(.DEPTH(RAQ_DEPTH)) u_raq (
    .clk, .rst_n, .push(acc.valid), .push_ip(acc_cip), .head(raq_head), .full(raq_full)
  );

  temporal_table #(.ENTRIES(TT_ENTRIES)) u_tt (
    .clk, .rst_n,
    .lk_valid(acc.valid), .lk_leader(acc_cip), .lk_hit(tt_hit), .lk_follower(tt_follower),
    .ins_valid(tt_ins), .ins_leader(raq_head),
    .ins_follower(acc_cip)
  );

  // ---------------- recent prefetch queue and LAPRQs ----------------
  cline_t rpq_line, laprq_line;
  logic   rpq_hit, rpq_push;
  logic   laprq_tt_hit, laprq_lp_hit, laprq_clr, laprq_tt_push, laprq_lp_push;

  line_queue #(.ENTRIES(RPQ_ENTRIES)) u_rpq (
    .clk, .rst_n, .chk_line(rpq_line), .chk_hit(rpq_hit), .clr_hit(1'b0),
    .push(rpq_push), .push_line(rpq_line)
  );

  line_queue #(.ENTRIES(LAPRQ_ENTRIES)) u_laprq_tt (
    .clk, .rst_n, .chk_line(cline_of(acc_cip)), .chk_hit(laprq_tt_hit),
    .clr_hit(laprq_clr), .push(laprq_tt_push), .push_line(laprq_line)
  );

  line_queue #(.ENTRIES(LAPRQ_ENTRIES)) u_laprq_lp (
    .clk, .rst_n, .chk_line(cline_of(acc_cip)), .chk_hit(laprq_lp_hit),
    .clr_hit(laprq_clr), .push(laprq_lp_push), .push_line(laprq_line)
  );

  // ---------------- lookahead engine ----------------
  jip_events_t eng_ev;
  lookahead_engine #(.MAX_DEPTH(MAX_DEPTH), .DEGREE(DEGREE)) u_engine (
    .clk, .rst_n,
    .acc_valid(acc.valid), .acc_cip, .acc_hit(acc.hit), .tt_hit, .tt_follower,
    .laprq_tt_hit, .laprq_lp_hit, .laprq_clr, .laprq_tt_push, .laprq_lp_push, .laprq_line,
    .lk_valid, .lk_ip, .lk_next, .lk_sjt_hit, .lk_mjt_hit, .lk_seq_end,
    .rpq_line, .rpq_hit, .rpq_push,
    .pf_valid, .pf_cip, .pf_ready,
    .lap_conf, .ev(eng_ev)
  );

  always_comb begin
    ev            = eng_ev;
    ev.sjt_insert = ev_sjt_insert;
    ev.to_mjt1    = ev_to_mjt1;
    ev.to_mjt2    = ev_to_mjt2;
    ev.tt_insert  = tt_ins;
    ev.map_alloc  = ev_map_miss;
  end

endmodule
