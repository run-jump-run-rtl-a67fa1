// tb_jip_tables: self-checking test of the runner, the jumpers and the
// migration between them (SJT of 8 entries, MJTs of 4 sets here).
// Directed steps follow one indirect branch from its first instance in the
// SJT, through MJT-I (second target) to MJT-II (fourth target), checking the
// lookup answer and the migration pulses at each step, then check that
// MJT-II predicts a repeating four-target sequence. Branches that always
// jump to the same target must be predicted by the SJT, non-branches by the
// runner: with no branch known in the rest of a line it moves to the next
// line's start (stopping at the 64 KB region boundary), otherwise it looks up
// the first known branch of the line.
module tb_jip_tables;
  import jip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lk_valid, lk_sjt_hit, lk_mjt_hit, lk_seq_end, tr_valid;
  cip_t lk_ip, lk_next, tr_ip, tr_target;
  logic ev_sjt_insert, ev_to_mjt1, ev_to_mjt2;
  int   checks = 0, failures = 0;
  int   n_ins = 0, n_m1 = 0, n_m2 = 0;

  jip_tables #(.SJT_ENTRIES(8), .M1_SETS(4), .M2_SETS(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_ins <= n_ins + int'(ev_sjt_insert);
    n_m1  <= n_m1 + int'(ev_to_mjt1);
    n_m2  <= n_m2 + int'(ev_to_mjt2);
  end

  task automatic expect_lookup(string what, cip_t ip, cip_t exp_next, logic exp_sjt,
                               logic exp_mjt, logic exp_end = 1'b0);
    @(negedge clk);
    lk_valid = 1; lk_ip = ip; #1;
    checks++;
    if (lk_next !== exp_next || lk_sjt_hit !== exp_sjt || lk_mjt_hit !== exp_mjt
        || lk_seq_end !== exp_end) begin
      failures++;
      $display("FAIL %s: next %h (exp %h) sjt %0b mjt %0b end %0b", what, lk_next, exp_next,
               lk_sjt_hit, lk_mjt_hit, lk_seq_end);
    end
    lk_valid = 0;
  endtask

  task automatic train(cip_t ip, cip_t t);
    @(negedge clk);
    tr_valid = 1; tr_ip = ip; tr_target = t;
    @(posedge clk); #1;
    tr_valid = 0;
  endtask

  task automatic expect_count(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  localparam cip_t A = 25'h0_0120;
  cip_t T [5] = '{25'h0_4000, 25'h0_5000, 25'h0_6000, 25'h0_7000, 25'h0_8000};

  initial begin
    lk_valid = 0; tr_valid = 0; lk_ip = '0; tr_ip = '0; tr_target = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_lookup("runner", 25'h1_2344, 25'h1_2380, 0, 0);
    expect_lookup("region end", 25'h1_ffc4, 25'h1_0000, 0, 0, 1);
    train(A, T[0]);
    @(negedge clk); expect_count("SJT inserts", n_ins, 1);
    expect_lookup("SJT target", A, T[0], 1, 0);
    train(A, T[0]);
    @(negedge clk); expect_count("no migration on same target", n_m1, 0);
    train(A, T[1]);
    @(negedge clk); expect_count("migration to MJT-I", n_m1, 1);
    // equal confidences and too short an array for a pattern: lowest slot
    expect_lookup("MJT-I hit", A, T[0], 0, 1);
    train(A, T[2]);
    train(A, T[1]);
    @(negedge clk); expect_count("still MJT-I with three targets", n_m2, 0);
    train(A, T[3]);
    @(negedge clk); expect_count("migration to MJT-II", n_m2, 1);
    // repeating four-target sequence: MJT-II must learn it exactly
    for (int r = 0; r < 6; r++)
      for (int i = 0; i < 4; i++) begin
        train(A, T[i]);
        if (r >= 2) expect_lookup("MJT-II sequence", A, T[(i + 1) % 4], 0, 1);
      end
    // single-target branches stay in the SJT
    for (int b = 1; b <= 5; b++) train(cip_t'(25'h2_0000 + b * 8), cip_t'(25'h3_0000 + b * 64));
    for (int b = 1; b <= 5; b++) train(cip_t'(25'h2_0000 + b * 8), cip_t'(25'h3_0000 + b * 64));
    for (int b = 1; b <= 5; b++)
      expect_lookup("SJT branch", cip_t'(25'h2_0000 + b * 8), cip_t'(25'h3_0000 + b * 64), 1, 0);
    // the runner finds the first branch after the line start, skips a line
    // whose branches all lie behind the IP
    expect_lookup("first branch of line", 25'h2_0000, 25'h3_0040, 1, 0);
    expect_lookup("branch after IP", 25'h2_000c, 25'h3_0080, 1, 0);
    expect_lookup("no branch left in line", 25'h2_002c, 25'h2_0040, 0, 0);
    expect_count("SJT inserts total", n_ins, 6);
    expect_count("MJT-I migrations total", n_m1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
