// tb_sjt: self-checking test of the Single Target Jump Table (8 entries).
// A behavioural model of the fully associative table with NRU replacement
// predicts both ports' hit and target on every cycle of a random mix of
// lookups, inserts and removals over 20 trigger IPs, so that the table
// fills, evicts and frees entries. A directed start checks the basic
// insert / hit / remove sequence.
module tb_sjt;
  import jip_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  logic lk_valid, lk_hit, tr_valid, tr_hit, wr_insert, wr_remove;
  cip_t lk_ip, lk_target, tr_ip, tr_target, tr_stored;
  int   checks = 0, failures = 0;

  sjt #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m_v [N], m_n [N];
  cip_t m_trig [N], m_tgt [N];

  function automatic int m_find(cip_t ip);
    for (int i = 0; i < N; i++) if (m_v[i] && m_trig[i] == ip) return i;
    return -1;
  endfunction

  task automatic check(string what, logic got, logic exp, cip_t gt, cip_t et);
    checks++;
    if (got !== exp || (exp && gt !== et)) begin
      failures++;
      $display("FAIL %s: hit %0b/%0b target %h/%h", what, got, exp, gt, et);
    end
  endtask

  initial begin
    int li, ti, v;
    for (int i = 0; i < N; i++) begin m_v[i] = 0; m_n[i] = 0; end
    lk_valid = 0; tr_valid = 0; wr_insert = 0; wr_remove = 0;
    lk_ip = '0; tr_ip = '0; tr_target = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      lk_valid  = $urandom_range(0, 1);
      lk_ip     = cip_t'($urandom_range(0, 19) * 4);
      tr_valid  = $urandom_range(0, 1);
      tr_ip     = cip_t'($urandom_range(0, 19) * 4);
      tr_target = cip_t'($urandom_range(1, 3) * 1000);
      wr_insert = $urandom_range(0, 1);
      wr_remove = !wr_insert && ($urandom_range(0, 3) == 0);
      #1;
      li = lk_valid ? m_find(lk_ip) : -1;
      ti = tr_valid ? m_find(tr_ip) : -1;
      check("lookup", lk_hit, li >= 0, lk_target, li >= 0 ? m_tgt[li] : '0);
      check("train", tr_hit, ti >= 0, tr_stored, ti >= 0 ? m_tgt[ti] : '0);
      @(posedge clk);
      // model update, same order as the table's rules
      if (wr_insert && tr_valid && ti < 0) begin
        v = -1;
        for (int i = 0; i < N; i++) if (!m_v[i] && v < 0) v = i;
        if (v < 0) for (int i = 0; i < N; i++) if (!m_n[i] && v < 0) v = i;
        if (v < 0) begin for (int i = 0; i < N; i++) m_n[i] = 0; v = 0; end
        m_v[v] = 1; m_n[v] = 1; m_trig[v] = tr_ip; m_tgt[v] = tr_target;
      end else if (ti >= 0 && !wr_remove) m_n[ti] = 1;
      if (li >= 0) m_n[li] = 1;
      if (wr_remove && ti >= 0) m_v[ti] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
