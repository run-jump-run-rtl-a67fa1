// sjt: Single Target Jump Table (Jumper-I).
//
// Holds [trigger IP, target IP] pairs of branches that so far have always
// jumped to one target (mostly direct jumps/calls and taken conditional
// branches). It is fully associative with ENTRIES (7800) entries of a 25-bit
// compressed trigger IP, a 25-bit compressed target IP and a not-recently-used
// (NRU) bit, as published. The valid bit per entry is this design's addition.
//
// Two ports, both searching all entries combinationally in one cycle:
//   lookup port  (lk_*): used by the lookahead; a hit returns the target.
//   training port (tr_*): used for the branch of the current L1-I access; it
//                returns whether the trigger is present and its stored target.
//                wr_insert writes [tr_ip, tr_target] into a victim entry,
//                wr_remove invalidates the entry tr_ip hit (migration to MJT-I).
// Replacement (this design's reading of NRU): a hit on either port sets the
// entry's NRU bit; an insert takes the first invalid entry, else the first
// entry whose NRU bit is clear; if every bit is set, all bits are cleared
// and entry 0 is taken. The inserted entry's bit is set. Writes take effect
// at the next clock edge.
module sjt
  import jip_pkg::*;
#(
  parameter int unsigned ENTRIES = 7800
) (
  input  logic clk,
  input  logic rst_n,
  // lookahead lookup
  input  logic lk_valid,
  input  cip_t lk_ip,
  output logic lk_hit,
  output cip_t lk_target,
  // training
  input  logic tr_valid,
  input  cip_t tr_ip,
  input  cip_t tr_target,
  output logic tr_hit,
  output cip_t tr_stored,
  input  logic wr_insert,
  input  logic wr_remove
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  logic [ENTRIES-1:0] nru_q;
  cip_t               trig_q [ENTRIES];
  cip_t               tgt_q  [ENTRIES];

  logic [IW-1:0] lk_idx, tr_idx, vic_idx;
  logic          vic_found, all_used;

  always_comb begin
    lk_hit    = 1'b0;
    tr_hit    = 1'b0;
    lk_idx    = '0;
    tr_idx    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && trig_q[i] == lk_ip && !lk_hit) begin
        lk_hit = lk_valid;
        lk_idx = IW'(i);
      end
      if (valid_q[i] && trig_q[i] == tr_ip && !tr_hit) begin
        tr_hit = tr_valid;
        tr_idx = IW'(i);
      end
    end
  end

  assign lk_target = tgt_q[lk_idx];
  assign tr_stored = tgt_q[tr_idx];

  // victim: first invalid entry, else first entry with a clear NRU bit
  always_comb begin
    vic_found = 1'b0;
    vic_idx   = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!valid_q[i] && !vic_found) begin
        vic_found = 1'b1;
        vic_idx   = IW'(i);
      end
    end
    all_used = 1'b0;
    if (!vic_found) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (!nru_q[i] && !vic_found) begin
          vic_found = 1'b1;
          vic_idx   = IW'(i);
        end
      end
      all_used = !vic_found;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      nru_q   <= '0;
    end else begin
      if (wr_insert && tr_valid && !tr_hit) begin
        if (all_used) nru_q <= '0;
        valid_q[vic_idx] <= 1'b1;
        nru_q[vic_idx]   <= 1'b1;
        trig_q[vic_idx]  <= tr_ip;
        tgt_q[vic_idx]   <= tr_target;
      end else begin
        if (tr_hit && !wr_remove) nru_q[tr_idx] <= 1'b1;
      end
      if (lk_hit) nru_q[lk_idx] <= 1'b1;
      if (wr_remove && tr_hit) valid_q[tr_idx] <= 1'b0;
    end
  end

endmodule
