// tb_jip_prefetcher: end-to-end test of the whole prefetcher at its default
// (published) sizes.
//
// The testbench runs a synthetic program of 160 basic blocks (4-byte
// instructions, about 170 cache lines) in one 64 KB code region, calling three small functions in
// a second region. Block ends cycle through the branch kinds the prefetcher
// classifies: no branch, a conditional branch taken every other time, a
// call whose function's return goes back to many call sites, a direct jump,
// an indirect jump with four targets and one with two. One access is made
// per cycle; a fully associative L1-I model (96 lines, FIFO) decides
// hits, an L1-I miss stalls fetch for 12 cycles, and every 400 accesses the
// front end idles for 300 cycles. The L1-I prefetch queue refuses one
// request in eight. A final phase touches 600 fresh code regions, wrapping
// the 512-entry mapper. The L1-I model is larger than the 64-entry RPQ, as
// a real L1-I is, and smaller than the program, so lines keep being evicted
// and have to be prefetched again.
//
// Checks, all independent of the design's internals:
//   - every prefetch is 64-byte aligned and lies in a region the program uses;
//   - no line is prefetched twice within 64 consecutive prefetches (RPQ);
//   - a refused request is held unchanged;
//   - the prefetcher removes at least half of the misses that
//     the same access stream causes in an L1-I model without prefetching;
//   - every mechanism happened at least once (events counted from ev).
module tb_jip_prefetcher;
  import jip_pkg::*;

  localparam int N_ACC   = 10000;   // program accesses
  localparam int N_BLK   = 160;
  localparam int L1_LINES = 96;
  localparam int MISS_LAT = 12;
  localparam logic [47:0] REG_A = 48'h0000_5555_0001;
  localparam logic [47:0] REG_B = 48'h0000_5555_0002;

  logic        clk = 0, rst_n = 0;
  l1i_access_t acc;
  logic        pf_valid, pf_ready;
  ip_t         pf_addr;
  logic [8:0]  lap_conf;
  jip_events_t ev;
  int          checks = 0, failures = 0;

  jip_prefetcher dut (.*);

  always #5 clk = ~clk;
  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  int blk_start [N_BLK];   // low 16 bits of each block's first instruction
  int blk_len   [N_BLK];   // instructions
  int visits    [N_BLK];
  int fn_start  [3];
  localparam int FN_LEN = 12;

  function automatic ip_t ip_a(int low); return {REG_A, 16'(low)}; endfunction
  function automatic ip_t ip_b(int low); return {REG_B, 16'(low)}; endfunction

  // ---------------- L1-I models ----------------
  logic [57:0] l1 [$], l1_ref [$];
  function automatic bit present(input logic [57:0] q [$], input logic [57:0] line);
    foreach (q[i]) if (q[i] == line) return 1;
    return 0;
  endfunction
  function automatic void fill_l1(input logic [57:0] line);
    if (present(l1, line)) return;
    l1.push_back(line);
    if (l1.size() > L1_LINES) void'(l1.pop_front());
  endfunction
  function automatic void fill_ref(input logic [57:0] line);
    if (present(l1_ref, line)) return;
    l1_ref.push_back(line);
    if (l1_ref.size() > L1_LINES) void'(l1_ref.pop_front());
  endfunction

  // ---------------- observation ----------------
  int   n_ev [string];
  logic [57:0] pf_hist [$];
  int   n_pf = 0, misses = 0, misses_ref = 0, useful = 0;
  bit   program_phase = 1;
  logic [57:0] pf_lines_seen [logic [57:0]];
  bit   prev_hold = 0;
  ip_t  prev_addr;

  task automatic count(string name, logic pulse);
    if (!n_ev.exists(name)) n_ev[name] = 0;
    if (pulse) n_ev[name]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    count("lookahead_start", ev.lookahead_start); count("depth_stop", ev.depth_stop);
    count("degree_stop", ev.degree_stop);         count("rpq_filtered", ev.rpq_filtered);
    count("tt_prefetch", ev.tt_prefetch);         count("ext_start", ev.ext_start);
    count("ext_round_tt", ev.ext_round_tt);       count("ext_round_lp", ev.ext_round_lp);
    count("ext_abort", ev.ext_abort);             count("lap_inc", ev.lap_inc);
    count("lap_dec", ev.lap_dec);                 count("lap_reset", ev.lap_reset);
    count("stall", ev.stall);                     count("jump_sjt", ev.jump_sjt);
    count("jump_mjt", ev.jump_mjt);               count("run_seq", ev.run_seq);
    count("sjt_insert", ev.sjt_insert);           count("to_mjt1", ev.to_mjt1);
    count("to_mjt2", ev.to_mjt2);                 count("tt_insert", ev.tt_insert);
    count("map_alloc", ev.map_alloc);         count("path_resume", ev.path_resume);
    // handshake: a refused request stays put
    if (prev_hold) begin
      checks++;
      if (!pf_valid || pf_addr !== prev_addr) begin
        failures++; $display("FAIL refused prefetch changed");
      end
    end
    prev_hold = pf_valid && !pf_ready;
    prev_addr = pf_addr;
    if (pf_valid && pf_ready) begin
      n_pf++;
      checks++;
      if (pf_addr[5:0] != 0) begin failures++; $display("FAIL unaligned prefetch %h", pf_addr); end
      if (program_phase) begin
        checks++;
        if (pf_addr[63:16] != REG_A && pf_addr[63:16] != REG_B) begin
          failures++; $display("FAIL prefetch %h outside the program", pf_addr);
        end
        checks++;
        if (present(pf_hist, pf_addr[63:6])) begin
          failures++; $display("FAIL line %h prefetched twice within 64 prefetches", pf_addr);
        end
        pf_hist.push_back(pf_addr[63:6]);
        if (pf_hist.size() > 63) void'(pf_hist.pop_front());
      end
      if (!present(l1, pf_addr[63:6])) pf_lines_seen[pf_addr[63:6]] = pf_addr[63:6];
      fill_l1(pf_addr[63:6]);
    end
  end

  always @(negedge clk) pf_ready = ($urandom_range(0, 7) != 0);

  // one access; returns after the access cycle and any miss stall
  task automatic access(ip_t ip, logic is_br = 0, ip_t tgt = '0);
    logic hit;
    @(negedge clk);
    hit = present(l1, ip[63:6]);
    if (!present(l1_ref, ip[63:6])) misses_ref++;
    fill_ref(ip[63:6]);
    if (!hit) misses++;
    else if (pf_lines_seen.exists(ip[63:6])) begin useful++; pf_lines_seen.delete(ip[63:6]); end
    acc.valid = 1; acc.ip = ip; acc.hit = hit; acc.is_branch = is_br; acc.target = tgt;
    @(posedge clk); #1;
    acc.valid = 0;
    if (!hit) begin
      fill_l1(ip[63:6]);
      repeat (MISS_LAT) @(posedge clk);
      #1;
    end
  endtask

  int n_acc = 0;
  task automatic run_block(int b, output int nxt);
    int kind = b % 6;
    int last = blk_start[b] + 4 * (blk_len[b] - 1);
    int f;
    for (int k = 0; k < blk_len[b] - 1; k++) access(ip_a(blk_start[b] + 4 * k));
    visits[b]++;
    case (kind)
      0: begin access(ip_a(last)); nxt = (b + 1) % N_BLK; end
      1: begin
        if (visits[b] % 2 == 0) begin
          nxt = (b + 2) % N_BLK;
          access(ip_a(last), 1, ip_a(blk_start[nxt]));
        end else begin
          nxt = (b + 1) % N_BLK;
          access(ip_a(last), 1, '0);    // not taken
        end
      end
      2: begin
        f = (b / 6) % 3;
        access(ip_a(last), 1, ip_b(fn_start[f]));
        for (int k = 0; k < FN_LEN - 1; k++) access(ip_b(fn_start[f] + 4 * k));
        nxt = (b + 1) % N_BLK;
        access(ip_b(fn_start[f] + 4 * (FN_LEN - 1)), 1, ip_a(blk_start[nxt]));   // return
      end
      3: begin nxt = (b + 1) % N_BLK; access(ip_a(last), 1, ip_a(blk_start[nxt])); end
      4: begin nxt = (b + 1 + visits[b] % 4) % N_BLK; access(ip_a(last), 1, ip_a(blk_start[nxt])); end
      default: begin nxt = (b + 1 + visits[b] % 2) % N_BLK; access(ip_a(last), 1, ip_a(blk_start[nxt])); end
    endcase
  endtask

  initial begin
    int b, nxt, addr, last_idle;
    string must [$] = '{"lookahead_start", "path_resume", "depth_stop", "degree_stop", "rpq_filtered",
                        "tt_prefetch", "ext_start", "ext_round_tt", "ext_round_lp", "ext_abort",
                        "lap_inc", "lap_dec", "lap_reset", "stall", "jump_sjt", "jump_mjt",
                        "run_seq", "sjt_insert", "to_mjt1", "to_mjt2", "tt_insert", "map_alloc"};
    acc = '0;
    pf_ready = 1;
    addr = 16'h1000;
    for (int i = 0; i < N_BLK; i++) begin
      blk_start[i] = addr;
      blk_len[i]   = 6 + (i * 7) % 23;
      visits[i]    = 0;
      addr += 4 * blk_len[i];
    end
    for (int f = 0; f < 3; f++) fn_start[f] = 16'h4000 + f * 16'h0100;
    repeat (3) @(posedge clk);
    rst_n = 1;

    b = 0;
    last_idle = 0;
    while (n_acc < N_ACC) begin
      run_block(b, nxt);
      b = nxt;
      n_acc += blk_len[b];
      if (n_acc - last_idle >= 400) begin
        last_idle = n_acc;
        repeat (300) @(posedge clk);
      end
    end
    // coverage of the program's misses
    $display("accesses %0d: misses %0d with prefetching, %0d without; %0d prefetches, %0d useful",
             n_acc, misses, misses_ref, n_pf, useful);
    checks++;
    if (misses * 2 > misses_ref) begin
      failures++; $display("FAIL prefetching removed too few misses");
    end
    checks++;
    if (useful == 0) begin failures++; $display("FAIL no useful prefetch"); end

    // fresh code regions: more upper-bit values than mapper entries
    program_phase = 0;
    for (int r = 0; r < 600; r++) access({48'h0000_6000_0000 + 48'(r), 16'h0040});
    repeat (300) @(posedge clk);

    foreach (must[i]) begin
      checks++;
      if (!n_ev.exists(must[i]) || n_ev[must[i]] == 0) begin
        failures++; $display("FAIL mechanism never happened: %s", must[i]);
      end
    end
    checks++;
    if (n_ev["map_alloc"] < 513) begin
      failures++; $display("FAIL only %0d mapper allocations", n_ev["map_alloc"]);
    end
    foreach (n_ev[k]) $display("  %-16s %0d", k, n_ev[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
