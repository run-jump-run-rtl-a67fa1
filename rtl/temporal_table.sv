// temporal_table: [leader IP, follower IP] pairs for timely prefetching.
//
// When an L1-I access misses, the IP accessed RAQ_DEPTH accesses earlier
// (the leader) is paired with the missing IP (the follower). Later, an access
// to the leader prefetches the follower's line, early enough to hide the
// latency that the lookahead alone would not. The table is fully
// associative with ENTRIES (7150) pairs of 25-bit compressed IPs and uses
// random replacement, as published.
//
// Lookup (lk_*) is combinational. An insert (ins_*) that finds its leader
// already present overwrites that pair's follower; otherwise it fills the
// first invalid entry or, when the table is full, a pseudo-random entry
// taken from a 16-bit LFSR modulo ENTRIES. The in-place update, the valid
// bits and the LFSR are this design's choices. Inserts take effect at the
// next clock edge.
module temporal_table
  import jip_pkg::*;
#(
  parameter int unsigned ENTRIES = 7150
) (
  input  logic clk,
  input  logic rst_n,
  input  logic lk_valid,
  input  cip_t lk_leader,
  output logic lk_hit,
  output cip_t lk_follower,
  input  logic ins_valid,
  input  cip_t ins_leader,
  input  cip_t ins_follower
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  cip_t               lead_q [ENTRIES];
  cip_t               foll_q [ENTRIES];
  logic [15:0]        lfsr_q;

  logic [IW-1:0] lk_idx, ins_idx, free_idx;
  logic          ins_hit, free_found;

  always_comb begin
    lk_hit     = 1'b0;
    ins_hit    = 1'b0;
    free_found = 1'b0;
    lk_idx     = '0;
    ins_idx    = '0;
    free_idx   = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && lead_q[i] == lk_leader && !lk_hit) begin
        lk_hit = lk_valid;
        lk_idx = IW'(i);
      end
      if (valid_q[i] && lead_q[i] == ins_leader && !ins_hit) begin
        ins_hit = 1'b1;
        ins_idx = IW'(i);
      end
      if (!valid_q[i] && !free_found) begin
        free_found = 1'b1;
        free_idx   = IW'(i);
      end
    end
  end

  assign lk_follower = foll_q[lk_idx];

  logic [IW-1:0] wr_idx;
  always_comb begin
    if (ins_hit)         wr_idx = ins_idx;
    else if (free_found) wr_idx = free_idx;
    else                 wr_idx = IW'(32'(lfsr_q) % ENTRIES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      lfsr_q  <= 16'hACE1;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      if (ins_valid) begin
        valid_q[wr_idx] <= 1'b1;
        lead_q[wr_idx]  <= ins_leader;
        foll_q[wr_idx]  <= ins_follower;
      end
    end
  end

endmodule
