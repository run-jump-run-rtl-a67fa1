// mjt: Multiple Targets Jump Table (Jumper-II), used twice: MJT-I and MJT-II.
//
// Holds branches (mostly indirect jumps/calls and returns) that jump to
// different targets on different instances. The table is direct mapped with
// SETS entries. The 25-bit compressed trigger IP is shifted right by two; the
// low IDX_W bits of the result index the table and all other bits (the upper
// bits and the two shifted-out bits) form the tag. Each entry stores up to NT
// target IPs, a 2-bit confidence counter per target, and the array of
// targets: the indices of the targets of the last NH instances, oldest first.
// Published sizes: MJT-I 1024 sets, 3 targets, 8 history slots of 2 bits,
// 15-bit tag; MJT-II 512 sets, 8 targets, 16 slots of 3 bits, 16-bit tag;
// K = 4 for both. The default parameters are MJT-I's.
//
// Prediction (lookup port, combinational): the last K history slots form a
// pattern; it is compared with every earlier K-slot window of the array. If
// a window from slot i to j matches, the target in slot j+1 is predicted
// (the most recent matching window wins, this design's choice). Without a
// match the target with the highest confidence is predicted (lowest slot on
// a tie).
// Training (tr_* port, applied at the clock edge):
//   wr_update  records one instance of tr_ip jumping to tr_target: the target's
//              confidence is incremented, the others' decremented (saturating,
//              this design's choice); an unknown target takes a free slot, or,
//              when all NT slots are used, replaces the target whose latest
//              appearance in the array is oldest (published policy); its index
//              is appended to the array.
//   wr_install writes a whole entry (used when a branch migrates in).
//   wr_remove  invalidates the entry tr_ip hit (migration out).
// Beyond the published fields each entry has a valid bit, a count of used
// target slots and a count of filled history slots.
module mjt
  import jip_pkg::*;
#(
  parameter int unsigned SETS = 1024,
  parameter int unsigned NT   = 3,
  parameter int unsigned NH   = 8,
  parameter int unsigned K    = 4,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned TAG_W = CIP_W - IDX_W,
  localparam int unsigned TI_W  = $clog2(NT),
  localparam int unsigned NTC_W = $clog2(NT + 1),
  localparam int unsigned HC_W  = $clog2(NH + 1)
) (
  input  logic clk,
  input  logic rst_n,
  // lookahead lookup
  input  logic lk_valid,
  input  cip_t lk_ip,
  output logic lk_hit,
  output cip_t lk_target,
  // training: the entry tr_ip maps to
  input  logic             tr_valid,
  input  cip_t             tr_ip,
  input  cip_t             tr_target,
  output logic             tr_hit,
  output logic             tr_known,   // tr_target already a stored target
  output logic [NTC_W-1:0] rd_ntgt,
  output cip_t             rd_tgt  [NT],
  output logic [1:0]       rd_conf [NT],
  output logic [TI_W-1:0]  rd_hist [NH],
  output logic [HC_W-1:0]  rd_hcnt,
  input  logic             wr_update,
  input  logic             wr_remove,
  input  logic             wr_install,
  input  logic [NTC_W-1:0] ins_ntgt,
  input  cip_t             ins_tgt  [NT],
  input  logic [1:0]       ins_conf [NT],
  input  logic [TI_W-1:0]  ins_hist [NH],
  input  logic [HC_W-1:0]  ins_hcnt
);
  logic [SETS-1:0]  valid_q;
  logic [TAG_W-1:0] tag_q  [SETS];
  logic [NTC_W-1:0] ntgt_q [SETS];
  logic [HC_W-1:0]  hcnt_q [SETS];
  cip_t             tgt_q  [SETS][NT];
  logic [1:0]       conf_q [SETS][NT];
  logic [TI_W-1:0]  hist_q [SETS][NH];

  function automatic logic [IDX_W-1:0] idx_of(cip_t c);
    return c[IDX_W+1:2];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(cip_t c);
    return {c[CIP_W-1:IDX_W+2], c[1:0]};
  endfunction

  // ---------------- prediction ----------------
  logic [IDX_W-1:0] lk_set;
  logic             pat_hit;
  logic [TI_W-1:0]  pred_slot, best_slot;
  logic [1:0]       best_conf;

  assign lk_set = idx_of(lk_ip);
  assign lk_hit = lk_valid && valid_q[lk_set] && tag_q[lk_set] == tag_of(lk_ip);

  always_comb begin
    pat_hit   = 1'b0;
    pred_slot = '0;
    // window starting at slot i covers slots i..i+K-1, predicts slot i+K
    for (int unsigned i = 0; i + K < NH; i++) begin
      logic eq;
      eq = (int'(i) >= int'(NH) - int'(hcnt_q[lk_set]));
      for (int unsigned k = 0; k < K; k++)
        if (hist_q[lk_set][i+k] != hist_q[lk_set][NH-K+k]) eq = 1'b0;
      if (eq) begin
        pat_hit   = 1'b1;
        pred_slot = hist_q[lk_set][i+K];
      end
    end
    best_slot = '0;
    best_conf = conf_q[lk_set][0];
    for (int unsigned t = 1; t < NT; t++) begin
      if (t < ntgt_q[lk_set] && conf_q[lk_set][t] > best_conf) begin
        best_conf = conf_q[lk_set][t];
        best_slot = TI_W'(t);
      end
    end
  end

  assign lk_target = tgt_q[lk_set][pat_hit ? pred_slot : best_slot];

  // ---------------- training ----------------
  logic [IDX_W-1:0] tr_set;
  logic [TI_W-1:0]  known_slot, old_slot, new_slot;
  int               last_pos [NT];

  assign tr_set  = idx_of(tr_ip);
  assign tr_hit  = tr_valid && valid_q[tr_set] && tag_q[tr_set] == tag_of(tr_ip);
  assign rd_ntgt = ntgt_q[tr_set];
  assign rd_hcnt = hcnt_q[tr_set];
  always_comb begin
    for (int unsigned t = 0; t < NT; t++) begin
      rd_tgt[t]  = tgt_q[tr_set][t];
      rd_conf[t] = conf_q[tr_set][t];
    end
    for (int unsigned h = 0; h < NH; h++) rd_hist[h] = hist_q[tr_set][h];
  end

  always_comb begin
    tr_known   = 1'b0;
    known_slot = '0;
    for (int unsigned t = 0; t < NT; t++) begin
      if (t < ntgt_q[tr_set] && tgt_q[tr_set][t] == tr_target && !tr_known) begin
        tr_known   = 1'b1;
        known_slot = TI_W'(t);
      end
    end
    // latest position of each target in the array (-1: absent)
    for (int unsigned t = 0; t < NT; t++) begin
      last_pos[t] = -1;
      for (int unsigned h = 0; h < NH; h++)
        if (int'(h) >= int'(NH) - int'(hcnt_q[tr_set]) && hist_q[tr_set][h] == TI_W'(t))
          last_pos[t] = int'(h);
    end
    old_slot = '0;
    for (int unsigned t = 1; t < NT; t++)
      if (last_pos[t] < last_pos[old_slot]) old_slot = TI_W'(t);
    if (tr_known)                   new_slot = known_slot;
    else if (ntgt_q[tr_set] < NTC_W'(NT)) new_slot = TI_W'(ntgt_q[tr_set]);
    else                            new_slot = old_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (tr_valid) begin
      if (wr_install) begin
        valid_q[tr_set] <= 1'b1;
        tag_q[tr_set]   <= tag_of(tr_ip);
        ntgt_q[tr_set]  <= ins_ntgt;
        hcnt_q[tr_set]  <= ins_hcnt;
        for (int unsigned t = 0; t < NT; t++) begin
          tgt_q[tr_set][t]  <= ins_tgt[t];
          conf_q[tr_set][t] <= ins_conf[t];
        end
        for (int unsigned h = 0; h < NH; h++) hist_q[tr_set][h] <= ins_hist[h];
      end else if (wr_remove && tr_hit) begin
        valid_q[tr_set] <= 1'b0;
      end else if (wr_update && tr_hit) begin
        if (!tr_known) begin
          tgt_q[tr_set][new_slot] <= tr_target;
          if (ntgt_q[tr_set] < NTC_W'(NT)) ntgt_q[tr_set] <= ntgt_q[tr_set] + 1'b1;
        end
        for (int unsigned t = 0; t < NT; t++) begin
          if (TI_W'(t) == new_slot) begin
            if (!tr_known)                     conf_q[tr_set][t] <= 2'd1;
            else if (conf_q[tr_set][t] != 2'd3) conf_q[tr_set][t] <= conf_q[tr_set][t] + 2'd1;
          end else if (conf_q[tr_set][t] != 2'd0) begin
            conf_q[tr_set][t] <= conf_q[tr_set][t] - 2'd1;
          end
        end
        for (int unsigned h = 0; h + 1 < NH; h++) hist_q[tr_set][h] <= hist_q[tr_set][h+1];
        hist_q[tr_set][NH-1] <= new_slot;
        if (hcnt_q[tr_set] < HC_W'(NH)) hcnt_q[tr_set] <= hcnt_q[tr_set] + 1'b1;
      end
    end
  end

endmodule
