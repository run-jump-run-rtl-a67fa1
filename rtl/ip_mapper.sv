// ip_mapper: the mapper table that compresses 64-bit IPs to 25 bits and back.
//
// The table holds ENTRIES (512) distinct upper-48-bit IP values and is fully
// associative. Compressing an IP searches all entries for its upper 48 bits;
// the index of the matching entry (9 bits) replaces them, and the lower 16
// bits are kept. On a miss the entry at the FIFO pointer is overwritten with
// the new upper bits and the pointer advances (first-in-first-out
// replacement, as published). Reverse mapping needs no search: the 9-bit
// index addresses the table directly, so the same table serves the IP mapper
// and the reverse IP mapper. Compressed IPs that still name an overwritten
// entry then decompress to the new upper bits; this loss of accuracy is the
// published behaviour once more than 512 upper values occur.
//
// Interface: two compress ports (a: the L1-I access IP, b: the branch target
// used for training) and one reverse port. Compression is combinational and
// valid in the same cycle; a port that misses allocates its entry at the
// next clock edge, and its returned index is already the one allocated. When
// both ports miss on different upper values, a gets the entry at the pointer
// and b the one after it; b also skips the entry that a hit in the same
// cycle, so that neither port's answer is overwritten. A per-entry valid bit, cleared by reset, is this
// design's addition so that an empty table never matches.
module ip_mapper
  import jip_pkg::*;
#(
  parameter int unsigned ENTRIES = 512
) (
  input  logic clk,
  input  logic rst_n,
  // compress port a
  input  logic a_valid,
  input  ip_t  a_ip,
  output cip_t a_cip,
  output logic a_miss,
  // compress port b
  input  logic b_valid,
  input  ip_t  b_ip,
  output cip_t b_cip,
  // reverse port
  input  cip_t r_cip,
  output ip_t  r_ip
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [UPPER_W-1:0] upper_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [IW-1:0]      ptr_q;

  logic [UPPER_W-1:0] a_up, b_up;
  logic          a_hit, b_hit_raw, b_hit;
  logic [IW-1:0] a_hidx, b_hidx, a_idx, b_idx, b_alloc_idx;
  logic          a_alloc, b_alloc;

  assign a_up = a_ip[IP_W-1:LOWER_W];
  assign b_up = b_ip[IP_W-1:LOWER_W];

  always_comb begin
    a_hit     = 1'b0;
    b_hit_raw = 1'b0;
    a_hidx    = '0;
    b_hidx    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && upper_q[i] == a_up && !a_hit) begin
        a_hit  = 1'b1;
        a_hidx = IW'(i);
      end
      if (valid_q[i] && upper_q[i] == b_up && !b_hit_raw) begin
        b_hit_raw = 1'b1;
        b_hidx    = IW'(i);
      end
    end
  end

  always_comb begin
    a_alloc = a_valid && !a_hit;
    a_idx   = a_hit ? a_hidx : ptr_q;
    // an entry that port a is about to overwrite no longer counts as a hit
    b_hit   = b_hit_raw && !(a_alloc && b_hidx == ptr_q);
    b_alloc_idx = a_alloc ? IW'(ptr_q + 1'b1) : ptr_q;
    // never overwrite the entry port a is using in this cycle
    if (a_valid && a_hit && a_hidx == b_alloc_idx) b_alloc_idx = IW'(b_alloc_idx + 1'b1);
    b_alloc = 1'b0;
    if (b_valid && !b_hit) begin
      if (a_valid && a_up == b_up) begin
        b_idx = a_idx;             // same upper bits as port a
      end else begin
        b_alloc = 1'b1;
        b_idx   = b_alloc_idx;
      end
    end else begin
      b_idx = b_hidx;
    end
  end

  assign a_cip  = {a_idx, a_ip[LOWER_W-1:0]};
  assign b_cip  = {b_idx, b_ip[LOWER_W-1:0]};
  assign a_miss = a_alloc;
  assign r_ip   = {upper_q[r_cip[CIP_W-1:LOWER_W]], r_cip[LOWER_W-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      ptr_q   <= '0;
    end else begin
      if (a_alloc) begin
        upper_q[ptr_q] <= a_up;
        valid_q[ptr_q] <= 1'b1;
      end
      if (b_alloc) begin
        upper_q[b_alloc_idx] <= b_up;
        valid_q[b_alloc_idx] <= 1'b1;
      end
      if (b_alloc)      ptr_q <= IW'(b_alloc_idx + 1'b1);
      else if (a_alloc) ptr_q <= IW'(ptr_q + 1'b1);
    end
  end

endmodule
