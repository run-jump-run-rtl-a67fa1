// tb_lookahead_engine: self-checking test of the lookahead controller at its
// published depth (260) and degree (7). The testbench stands in for the
// jump tables (either every IP jumps one line ahead, or the runner steps one
// byte), for the RPQ (a 64-line FIFO model) and for the LAPRQs (driven
// directly). It checks, with exact cycle counts:
//   - degree stop: 7 prefetches of the next 7 lines, the k-th leaving the
//     output register k+1 cycles after the access;
//   - depth stop: the byte-stepping runner ends after 260 lookups having
//     crossed 4 lines;
//   - temporal-table prefetch first, outside the degree;
//   - RPQ filtering, output stall under back-pressure;
//   - extended lookahead: 3 rounds of one prefetch each, following the
//     temporal path while LAP confidence >= 256 and the last-prefetch path
//     after it drops, the abort by an access, and the LAP counter's +2/-1
//     steps and its reset every 256 accesses;
//   - an access on the walked path continues the walk instead of restarting.
module tb_lookahead_engine;
  import jip_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        acc_valid, acc_hit, tt_hit, laprq_tt_hit, laprq_lp_hit;
  cip_t        acc_cip, tt_follower;
  logic        laprq_clr, laprq_tt_push, laprq_lp_push;
  cline_t      laprq_line, rpq_line;
  logic        lk_valid, lk_sjt_hit, lk_mjt_hit, lk_seq_end, rpq_hit, rpq_push;
  cip_t        lk_ip, lk_next, pf_cip;
  logic        pf_valid, pf_ready;
  logic [8:0]  lap_conf;
  jip_events_t ev;
  int          checks = 0, failures = 0;

  lookahead_engine dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stand-in jump tables ----
  bit jump_mode;   // 1: every IP jumps 64 bytes ahead (an SJT hit); 0: runner
  always_comb begin
    lk_sjt_hit = jump_mode;
    lk_mjt_hit = 1'b0;
    lk_next    = jump_mode ? lk_ip + 25'd64 : lk_ip + 25'd1;
    lk_seq_end = 1'b0;
  end

  // ---- RPQ model ----
  cline_t rpq_m [$];
  always_comb begin
    rpq_hit = 1'b0;
    foreach (rpq_m[i]) if (rpq_m[i] == rpq_line) rpq_hit = 1'b1;
  end
  always @(posedge clk) if (rpq_push) begin
    rpq_m.push_back(rpq_line);
    if (rpq_m.size() > 64) void'(rpq_m.pop_front());
  end

  // ---- observation ----
  int   cyc = 0, depth_cyc = 0;
  cip_t pf_log [$];
  int   pf_cyc [$];
  int   n_depth = 0, n_degree = 0, n_filt = 0, n_tt = 0, n_ext = 0, n_rtt = 0, n_rlp = 0;
  int   n_resume = 0;
  int   n_abort = 0, n_inc = 0, n_dec = 0, n_rst = 0, n_stall = 0, n_ltt = 0, n_llp = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev.depth_stop) depth_cyc = cyc;
    if (pf_valid && pf_ready) begin pf_log.push_back(pf_cip); pf_cyc.push_back(cyc); end
    n_depth  += int'(ev.depth_stop);   n_degree += int'(ev.degree_stop);
    n_filt   += int'(ev.rpq_filtered); n_tt     += int'(ev.tt_prefetch);
    n_ext    += int'(ev.ext_start);    n_rtt    += int'(ev.ext_round_tt);
    n_rlp    += int'(ev.ext_round_lp); n_abort  += int'(ev.ext_abort);
    n_inc    += int'(ev.lap_inc);      n_dec    += int'(ev.lap_dec);
    n_rst    += int'(ev.lap_reset);    n_stall  += int'(ev.stall);
    n_resume += int'(ev.path_resume);
    n_ltt    += int'(laprq_tt_push);   n_llp    += int'(laprq_lp_push);
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  int t0;
  task automatic access(cip_t ip, logic hit = 1'b1, logic tth = 1'b0, cip_t foll = '0,
                        logic lt = 1'b0, logic ll = 1'b0);
    @(negedge clk);
    acc_valid = 1; acc_cip = ip; acc_hit = hit; tt_hit = tth; tt_follower = foll;
    laprq_tt_hit = lt; laprq_lp_hit = ll;
    t0 = cyc;
    @(posedge clk); #1;
    acc_valid = 0; tt_hit = 0; laprq_tt_hit = 0; laprq_lp_hit = 0;
  endtask

  task automatic wait_degree_stop(int n);
    int c = 0;
    while (n_degree < n && c < 100) begin @(posedge clk); c++; end
    @(posedge clk); #1;   // the last prefetch leaves the output register
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    int base, cnt;
    acc_valid = 0; acc_hit = 0; tt_hit = 0; laprq_tt_hit = 0; laprq_lp_hit = 0;
    acc_cip = '0; tt_follower = '0; pf_ready = 1; jump_mode = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    expect_eq("LAP confidence after reset", int'(lap_conf), 256);

    // 1. degree stop with exact timing
    access(25'h0_1000);
    wait_degree_stop(1);
    expect_eq("degree-stop prefetches", pf_log.size(), 7);
    for (int k = 0; k < pf_log.size(); k++) begin
      expect_eq("degree-stop line", int'(pf_log[k]), 'h1000 + 64 * (k + 1));
      expect_eq("degree-stop cycle", pf_cyc[k] - t0, k + 2);
    end
    expect_eq("degree stops", n_degree, 1);
    // extended lookahead followed (no temporal target yet: last-prefetch path)
    idle(20);
    expect_eq("extended starts", n_ext, 1);
    expect_eq("extended rounds on last-prefetch path", n_rlp, 3);
    expect_eq("extended prefetches", pf_log.size(), 10);
    expect_eq("extended continues the last-prefetch path", int'(pf_log[7]), 'h1000 + 64 * 8);
    expect_eq("LAPRQ pushes (last-prefetch path)", n_llp, 3);

    // 2. depth stop with the byte-stepping runner
    pf_log.delete(); pf_cyc.delete();
    jump_mode = 0;
    access(25'h0_8000);
    cnt = 0;
    while (n_depth == 0 && cnt < 400) begin @(posedge clk); cnt++; end
    #1;
    expect_eq("depth stop reached", n_depth, 1);
    expect_eq("depth stop on the 260th lookup", depth_cyc - t0, 260);
    // lines 0x8040, 0x8080, 0x80c0, 0x8100 crossed within 260 bytes
    expect_eq("depth-stop prefetches", pf_log.size(), 4);
    idle(10);
    jump_mode = 1;
    idle(400);

    // 3. temporal-table prefetch first, outside the degree; RPQ filters the
    //    lines already prefetched by test 1
    pf_log.delete(); pf_cyc.delete();
    access(25'h0_1000, 1'b1, 1'b1, 25'h0_9a00);
    wait_degree_stop(2);
    expect_eq("temporal prefetches", n_tt, 1);
    expect_eq("temporal prefetch first", int'(pf_log[0]), 'h9a00);
    expect_eq("temporal prefetch cycle", pf_cyc[0] - t0, 2);
    checks++;
    if (n_filt < 7) begin failures++; $display("FAIL RPQ filtered %0d", n_filt); end
    // the walk skips the 10 filtered lines and then issues 7 new ones
    expect_eq("prefetches after filtering", pf_log.size(), 1 + 7);
    expect_eq("first unfiltered line", int'(pf_log[1]), 'h1000 + 64 * 11);
    idle(20);
    // 4. extended lookahead on the temporal path (confidence 256, target known)
    expect_eq("extended rounds on temporal path", n_rtt, 3);
    expect_eq("LAPRQ pushes (temporal path)", n_ltt, 3);
    expect_eq("temporal path starts after follower", int'(pf_log[8]), 'h9a00 + 64);

    // 5. LAP confidence: +2 per temporal-path hit, -1 per last-prefetch-path hit
    access(25'h5_0000, 1'b1, 1'b0, '0, 1'b1, 1'b0);
    #1; expect_eq("LAP +2", int'(lap_conf), 258);
    for (int i = 0; i < 3; i++) access(25'h5_0000 + 25'(i * 4096), 1'b1, 1'b0, '0, 1'b0, 1'b1);
    #1; expect_eq("LAP -3", int'(lap_conf), 255);
    expect_eq("LAP events", n_inc * 10 + n_dec, 13);
    idle(300);
    base = n_rlp;
    // confidence below 256: extended lookahead follows the last-prefetch path
    access(25'h6_0000);
    idle(40);
    expect_eq("rounds on last-prefetch path when confidence < 256", n_rlp - base, 3);

    // 6. abort: an access during the extended lookahead
    access(25'h7_0000);
    cnt = 0;
    while (!ev.ext_start && cnt < 100) begin @(posedge clk); cnt++; end
    @(posedge clk); #1;
    access(25'h7_4000);
    expect_eq("extended aborts", n_abort, 1);
    idle(40);

    // 7. stall: output held while the prefetch queue refuses
    pf_ready = 0;
    access(25'h8_0000);
    idle(10);
    checks++;
    if (!pf_valid || pf_cip != 25'h8_0040) begin failures++; $display("FAIL held prefetch %h", pf_cip); end
    checks++;
    if (n_stall < 5) begin failures++; $display("FAIL stall cycles %0d", n_stall); end
    pf_ready = 1;
    idle(30);

    // 9. an access on the walked path continues the walk with a new budget
    pf_log.delete(); pf_cyc.delete();
    access(25'h9_0000);
    idle(2);                     // the walk has passed 0x9_0040 and 0x9_0080
    base = n_resume;
    access(25'h9_0044);
    expect_eq("path resumes", n_resume - base, 1);
    idle(20);
    // 2 lines before the confirming access, then a full degree of 7 more
    expect_eq("prefetches of a continued walk", pf_log.size() >= 9 ? 9 : pf_log.size(), 9);
    expect_eq("continued walk goes on", int'(pf_log[8]), 'h9_0000 + 64 * 9);
    idle(40);

    // 8. LAP reset every 256 accesses
    for (int i = 0; i < 300 && n_rst == 0; i++) access(25'h0_2000 + 25'(i * 4096), 1'b1, 1'b0, '0, 1'b0, 1'b1);
    #1;
    expect_eq("LAP resets", n_rst, 1);
    expect_eq("LAP value after reset", int'(lap_conf), 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
