// branch_filter: Bloom filter that marks IPs which may be branches.
//
// Only branches are ever stored in the jump tables, so a walk over straight
// code only needs to look the tables up at IPs that are branches. Every
// trained branch IP sets two bits of a BITS-wide (4096) bit array, chosen
// by two hashes of its 25-bit compressed IP. A query takes the current walk
// IP and tests, in parallel, it and every following IP in the same 64-byte
// line in steps of STEP bytes; it returns the first that may be a branch
// (both of its bits set), or none. False positives only cost a table lookup
// that misses; there are no false negatives for IPs on the STEP grid of the
// query IP. Bits are never cleared except by reset, so IPs of evicted
// branches stay marked.
//
// Classifying IPs as branch / non-branch with a Bloom filter is the published
// suggestion for not looking the tables up at every IP; its size, its hashes
// and the line-wide parallel query are this design's.
module branch_filter
  import jip_pkg::*;
#(
  parameter int unsigned BITS = 4096,
  parameter int unsigned STEP = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ins_valid,
  input  cip_t ins_ip,
  input  cip_t q_ip,
  output logic q_found,
  output cip_t q_first
);
  localparam int unsigned HW    = $clog2(BITS);
  localparam int unsigned SLOTS = (1 << LINE_OFF_W) / STEP;

  logic [BITS-1:0] bits_q;

  function automatic logic [HW-1:0] h1(cip_t c);
    logic [2*HW-1:0] x = (2*HW)'(c);
    return x[HW-1:0] ^ x[2*HW-1:HW];
  endfunction
  function automatic logic [HW-1:0] h2(cip_t c);
    logic [2*HW-1:0] x = (2*HW)'({c[CIP_W-1:2], c[1:0]} * 25'd40503);
    return x[HW-1:0] ^ {x[HW-2:0], x[HW-1]} ^ x[2*HW-1:HW];
  endfunction

  always_comb begin
    cip_t c;
    q_found = 1'b0;
    q_first = q_ip;
    for (int unsigned k = 0; k < SLOTS; k++) begin
      c = q_ip + cip_t'(k * STEP);
      if (!q_found && cline_of(c) == cline_of(q_ip) && bits_q[h1(c)] && bits_q[h2(c)]) begin
        q_found = 1'b1;
        q_first = c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q <= '0;
    end else if (ins_valid) begin
      bits_q[h1(ins_ip)] <= 1'b1;
      bits_q[h2(ins_ip)] <= 1'b1;
    end
  end

endmodule
