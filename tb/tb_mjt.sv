// tb_mjt: self-checking test of the Multiple Targets Jump Table in both of
// its published shapes, MJT-I (3 targets, 8-slot array) and MJT-II (8
// targets, 16-slot array), each with 4 sets here. A behavioural model
// (class mjt_model) keeps every entry's targets, confidences and array of
// targets and predicts the lookup target. The stimulus installs entries,
// then trains them with repeating target sequences (which the array-of-
// targets match must predict exactly), with random targets (exercising
// confidence and oldest-target replacement) and with removals.
module tb_mjt;
  import jip_pkg::*;
  localparam int unsigned SETS = 4;
  localparam int unsigned K = 4;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  int   pattern_preds = 0, conf_preds = 0, replacements = 0;

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  class mjt_model #(int NT = 3, int NH = 8);
    bit   v [SETS];
    cip_t trig [SETS];
    int   ntgt [SETS], hcnt [SETS];
    cip_t tgt [SETS][NT];
    int   conf [SETS][NT];
    int   hist [SETS][NH];
    bit   last_by_pattern;
    function new();
      foreach (v[s]) v[s] = 0;
    endfunction
    function int set_of(cip_t c); return int'(c[$clog2(SETS)+1:2]); endfunction
    function bit hit(cip_t c);
      int s = set_of(c);
      return v[s] && trig[s] == c;
    endfunction
    function cip_t predict(cip_t c);
      int s = set_of(c), best, slot = -1;
      for (int i = 0; i + K < NH; i++) begin
        bit eq = (i >= NH - hcnt[s]);
        for (int k = 0; k < K; k++) if (hist[s][i+k] != hist[s][NH-K+k]) eq = 0;
        if (eq) slot = hist[s][i+K];
      end
      last_by_pattern = slot >= 0;
      if (slot >= 0) return tgt[s][slot];
      best = 0;
      for (int t = 1; t < ntgt[s]; t++) if (conf[s][t] > conf[s][best]) best = t;
      return tgt[s][best];
    endfunction
    function bit known(cip_t c, cip_t t);
      int s = set_of(c);
      for (int i = 0; i < ntgt[s]; i++) if (tgt[s][i] == t) return 1;
      return 0;
    endfunction
    function bit update(cip_t c, cip_t t);   // returns 1 when a target was replaced
      int s = set_of(c), slot = -1, oldest, lp [NT];
      bit repl = 0;
      for (int i = 0; i < ntgt[s]; i++) if (tgt[s][i] == t && slot < 0) slot = i;
      if (slot < 0) begin
        if (ntgt[s] < NT) begin slot = ntgt[s]; ntgt[s]++; end
        else begin
          for (int i = 0; i < NT; i++) begin
            lp[i] = -1;
            for (int h = NH - hcnt[s]; h < NH; h++) if (hist[s][h] == i) lp[i] = h;
          end
          oldest = 0;
          for (int i = 1; i < NT; i++) if (lp[i] < lp[oldest]) oldest = i;
          slot = oldest; repl = 1;
        end
        tgt[s][slot] = t;
        for (int i = 0; i < NT; i++) conf[s][i] = (i == slot) ? 1 : (conf[s][i] > 0 ? conf[s][i] - 1 : 0);
      end else begin
        for (int i = 0; i < NT; i++)
          conf[s][i] = (i == slot) ? (conf[s][i] < 3 ? conf[s][i] + 1 : 3) : (conf[s][i] > 0 ? conf[s][i] - 1 : 0);
      end
      for (int h = 0; h + 1 < NH; h++) hist[s][h] = hist[s][h+1];
      hist[s][NH-1] = slot;
      if (hcnt[s] < NH) hcnt[s]++;
      return repl;
    endfunction
    function void install(cip_t c, cip_t t0, cip_t t1);
      int s = set_of(c);
      v[s] = 1; trig[s] = c; ntgt[s] = 2; hcnt[s] = 2;
      for (int i = 0; i < NT; i++) begin tgt[s][i] = (i == 0) ? t0 : t1; conf[s][i] = (i < 2) ? 1 : 0; end
      for (int h = 0; h < NH; h++) hist[s][h] = 0;
      hist[s][NH-1] = 1;
    endfunction
  endclass

  // ---- one DUT per shape, driven by the same task ----
  `define MJT_TB_DUT(NAME, NT_, NH_) \
    logic NAME``_lk_hit, NAME``_tr_hit, NAME``_known; \
    cip_t NAME``_lk_tgt; \
    logic [$clog2(NT_+1)-1:0] NAME``_ntgt, NAME``_ins_ntgt; \
    cip_t NAME``_tgt [NT_], NAME``_ins_tgt [NT_]; \
    logic [1:0] NAME``_conf [NT_], NAME``_ins_conf [NT_]; \
    logic [$clog2(NT_)-1:0] NAME``_hist [NH_], NAME``_ins_hist [NH_]; \
    logic [$clog2(NH_+1)-1:0] NAME``_hcnt, NAME``_ins_hcnt; \
    mjt #(.SETS(SETS), .NT(NT_), .NH(NH_), .K(K)) NAME ( \
      .clk, .rst_n, .lk_valid(lk_valid), .lk_ip(lk_ip), .lk_hit(NAME``_lk_hit), \
      .lk_target(NAME``_lk_tgt), .tr_valid(tr_valid), .tr_ip(tr_ip), .tr_target(tr_target), \
      .tr_hit(NAME``_tr_hit), .tr_known(NAME``_known), .rd_ntgt(NAME``_ntgt), \
      .rd_tgt(NAME``_tgt), .rd_conf(NAME``_conf), .rd_hist(NAME``_hist), .rd_hcnt(NAME``_hcnt), \
      .wr_update(wr_update), .wr_remove(wr_remove), .wr_install(wr_install), \
      .ins_ntgt(NAME``_ins_ntgt), .ins_tgt(NAME``_ins_tgt), .ins_conf(NAME``_ins_conf), \
      .ins_hist(NAME``_ins_hist), .ins_hcnt(NAME``_ins_hcnt));

  logic lk_valid, tr_valid, wr_update, wr_remove, wr_install;
  cip_t lk_ip, tr_ip, tr_target, ins_t0, ins_t1;

  `MJT_TB_DUT(m1, 3, 8)
  `MJT_TB_DUT(m2, 8, 16)

  // install images: targets [t0, t1], array [.., 0, 1]
  always_comb begin
    m1_ins_ntgt = 2; m1_ins_hcnt = 2;
    m2_ins_ntgt = 2; m2_ins_hcnt = 2;
    for (int t = 0; t < 3; t++) begin m1_ins_tgt[t] = t == 0 ? ins_t0 : ins_t1; m1_ins_conf[t] = t < 2 ? 2'd1 : 2'd0; end
    for (int t = 0; t < 8; t++) begin m2_ins_tgt[t] = t == 0 ? ins_t0 : ins_t1; m2_ins_conf[t] = t < 2 ? 2'd1 : 2'd0; end
    for (int h = 0; h < 8; h++) m1_ins_hist[h] = (h == 7) ? 2'd1 : 2'd0;
    for (int h = 0; h < 16; h++) m2_ins_hist[h] = (h == 15) ? 3'd1 : 3'd0;
  end

  mjt_model #(3, 8)  mod1 = new();
  mjt_model #(8, 16) mod2 = new();

  cip_t trig [4] = '{cip_t'('h0100), cip_t'('h0104), cip_t'('h0208), cip_t'('h030c)};

  task automatic check_lookup(cip_t ip);
    cip_t e1, e2;
    @(negedge clk);
    lk_valid = 1; lk_ip = ip; tr_valid = 0; wr_update = 0; wr_remove = 0; wr_install = 0;
    #1;
    checks += 2;
    if (m1_lk_hit !== mod1.hit(ip)) begin failures++; $display("FAIL m1 hit %h dut %0b t=%0t", ip, m1_lk_hit, $time); end
    if (m2_lk_hit !== mod2.hit(ip)) begin failures++; $display("FAIL m2 hit %h", ip); end
    if (mod1.hit(ip)) begin
      e1 = mod1.predict(ip);
      checks++;
      if (mod1.last_by_pattern) pattern_preds++; else conf_preds++;
      if (m1_lk_tgt !== e1) begin failures++; $display("FAIL m1 predict %h: %h expected %h", ip, m1_lk_tgt, e1); end
    end
    if (mod2.hit(ip)) begin
      e2 = mod2.predict(ip);
      checks++;
      if (mod2.last_by_pattern) pattern_preds++; else conf_preds++;
      if (m2_lk_tgt !== e2) begin failures++; $display("FAIL m2 predict %h: %h expected %h", ip, m2_lk_tgt, e2); end
    end
    @(posedge clk); #1;
    lk_valid = 0;
  endtask

  task automatic train(cip_t ip, cip_t t);
    @(negedge clk);
    tr_valid = 1; tr_ip = ip; tr_target = t; wr_update = 1;
    #1;
    checks += 2;
    if (mod1.hit(ip) && m1_known !== mod1.known(ip, t)) begin failures++; $display("FAIL m1 known"); end
    if (mod2.hit(ip) && m2_known !== mod2.known(ip, t)) begin failures++; $display("FAIL m2 known"); end
    @(posedge clk); #1;
    if (mod1.hit(ip)) void'(mod1.update(ip, t));
    if (mod2.hit(ip)) replacements += int'(mod2.update(ip, t));
    tr_valid = 0; wr_update = 0;
  endtask

  task automatic install(cip_t ip, cip_t t0, cip_t t1);
    @(negedge clk);
    tr_valid = 1; tr_ip = ip; wr_install = 1; ins_t0 = t0; ins_t1 = t1;
    @(posedge clk); #1;
    mod1.install(ip, t0, t1);
    mod2.install(ip, t0, t1);
    tr_valid = 0; wr_install = 0;
  endtask

  task automatic remove(cip_t ip);
    @(negedge clk);
    tr_valid = 1; tr_ip = ip; wr_remove = 1;
    @(posedge clk); #1;
    if (mod1.hit(ip)) mod1.v[mod1.set_of(ip)] = 0;
    if (mod2.hit(ip)) mod2.v[mod2.set_of(ip)] = 0;
    tr_valid = 0; wr_remove = 0;
  endtask

  initial begin
    cip_t seq [6];
    lk_valid = 0; tr_valid = 0; wr_update = 0; wr_remove = 0; wr_install = 0;
    lk_ip = '0; tr_ip = '0; tr_target = '0; ins_t0 = '0; ins_t1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_lookup(trig[0]);               // empty: miss
    install(trig[0], 25'h11000, 25'h12000);
    check_lookup(trig[0]);
    // a repeating sequence of three targets: after warm-up the pattern
    // match must predict the next one exactly
    seq = '{25'h11000, 25'h12000, 25'h13000, 25'h11000, 25'h12000, 25'h13000};
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 3; i++) begin
        train(trig[0], seq[i]);
        check_lookup(trig[0]);
        if (r >= 4) begin
          checks += 2;
          if (m1_lk_tgt !== seq[(i + 1) % 3]) begin failures++; $display("FAIL m1 next in sequence"); end
          if (m2_lk_tgt !== seq[(i + 1) % 3]) begin failures++; $display("FAIL m2 next in sequence"); end
        end
      end
    // explicit: next after ...,T1,T2,T3,T1 is T2
    @(negedge clk); lk_valid = 1; lk_ip = trig[0]; #1;
    checks++;
    if (m1_lk_tgt !== 25'h11000) begin failures++; $display("FAIL m1 sequence: %h", m1_lk_tgt); end
    checks++;
    if (m2_lk_tgt !== 25'h11000) begin failures++; $display("FAIL m2 sequence: %h", m2_lk_tgt); end
    @(posedge clk); #1; lk_valid = 0;
    // random training on four triggers in four sets
    for (int i = 1; i < 4; i++) install(trig[i], cip_t'(i * 25'h100), cip_t'(i * 25'h100 + 25'h40));
    for (int c = 0; c < 1500; c++) begin
      int which = $urandom_range(0, 3);
      case ($urandom_range(0, 9))
        0: remove(trig[which]);
        1: install(trig[which], cip_t'($urandom_range(1, 12) * 25'h40), cip_t'($urandom_range(1, 12) * 25'h40));
        2, 3, 4, 5: train(trig[which], cip_t'($urandom_range(1, (c % 200 < 100) ? 3 : 30) * 25'h40));
        default: check_lookup(trig[which]);
      endcase
    end
    checks++;
    if (pattern_preds < 20 || conf_preds < 20 || replacements < 5) begin
      failures++;
      $display("FAIL coverage: %0d pattern, %0d confidence predictions, %0d replacements",
               pattern_preds, conf_preds, replacements);
    end
    $display("pattern predictions %0d, confidence predictions %0d, replacements %0d",
             pattern_preds, conf_preds, replacements);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
