// line_queue: a FIFO of recent cache-line addresses with a parallel search.
//
// Serves as the Recent Prefetch Queue (RPQ), which drops prefetch candidates
// whose line was prefetched recently, and as each of the two lookahead
// prefetch request queues (LAPRQs), which remember the lines an extended
// lookahead path prefetched so that a later L1-I hit on one of them can be
// credited to that path. Published size: 64 entries of 19-bit compressed
// line addresses for each queue.
//
// chk_line is compared with every valid entry combinationally (chk_hit).
// push writes push_line over the oldest entry at the next clock edge.
// clr_hit (used by the LAPRQs) invalidates the entry chk_line hit, so that
// each prefetched line is credited once; a push and a clear of the same
// entry in one cycle leave the pushed line valid. Valid bits, the round-robin
// write pointer and the clear are this design's choices.
module line_queue
  import jip_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cline_t chk_line,
  output logic   chk_hit,
  input  logic   clr_hit,
  input  logic   push,
  input  cline_t push_line
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  cline_t             line_q [ENTRIES];
  logic [IW-1:0]      wp_q, hit_idx;

  always_comb begin
    chk_hit = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && line_q[i] == chk_line && !chk_hit) begin
        chk_hit = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      wp_q    <= '0;
    end else begin
      if (clr_hit && chk_hit) valid_q[hit_idx] <= 1'b0;
      if (push) begin
        line_q[wp_q]  <= push_line;
        valid_q[wp_q] <= 1'b1;
        wp_q          <= (wp_q == IW'(ENTRIES - 1)) ? '0 : wp_q + 1'b1;
      end
    end
  end

endmodule
