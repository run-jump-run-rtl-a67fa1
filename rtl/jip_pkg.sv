// jip_pkg: widths, sizes and shared types of the JIP instruction prefetcher.
//
// A 64-bit instruction pointer (IP) is stored in compressed form: its upper
// 48 bits are replaced by the 9-bit index of a mapper-table entry, its lower
// 16 bits are kept, giving a 25-bit compressed IP. A 64-byte cache line of a
// compressed IP is the compressed IP without its 6 offset bits (19 bits),
// which is what the recent prefetch queue and the lookahead prefetch request
// queues hold. Table sizes and field widths follow the published hardware
// budget; the 64-byte line size and the 4-byte sequential step of the runner
// are this design's choices.
package jip_pkg;

  localparam int unsigned IP_W       = 64;  // full instruction pointer
  localparam int unsigned UPPER_W    = 48;  // part replaced by the mapper
  localparam int unsigned LOWER_W    = 16;  // part kept as is
  localparam int unsigned MAP_IDX_W  = 9;   // mapper index (512 entries)
  localparam int unsigned CIP_W      = MAP_IDX_W + LOWER_W;  // 25
  localparam int unsigned LINE_OFF_W = 6;   // 64-byte cache lines
  localparam int unsigned CLINE_W    = CIP_W - LINE_OFF_W;   // 19

  typedef logic [IP_W-1:0]    ip_t;
  typedef logic [CIP_W-1:0]   cip_t;
  typedef logic [CLINE_W-1:0] cline_t;

  // Which lookahead path an extended-lookahead round follows.
  typedef enum logic {
    PATH_LAST_PF = 1'b0,  // starts from the last prefetched IP
    PATH_TT      = 1'b1   // starts from the last temporal-table target IP
  } lap_path_e;

  // One L1-I access as the prefetcher sees it.
  typedef struct packed {
    logic valid;
    ip_t  ip;
    logic hit;        // the access hit in the L1-I
    logic is_branch;  // the instruction is a branch
    ip_t  target;     // predicted-taken target, 0 when none
  } l1i_access_t;

  // Single-cycle pulses that report what the prefetcher did.
  typedef struct packed {
    logic lookahead_start;   // a new lookahead began from an L1-I access
    logic path_resume;       // an access confirmed the running walk
    logic depth_stop;        // a lookahead ended at the depth limit
    logic degree_stop;       // a lookahead ended at the degree limit
    logic rpq_filtered;      // a candidate line was dropped by the RPQ
    logic tt_prefetch;       // a temporal-table follower was prefetched
    logic ext_start;         // an extended lookahead began
    logic ext_round_tt;      // an extended round followed the temporal path
    logic ext_round_lp;      // an extended round followed the last-prefetch path
    logic ext_abort;         // an extended lookahead was cut by an access
    logic lap_inc;           // LAP confidence raised (temporal path accurate)
    logic lap_dec;           // LAP confidence lowered (last-prefetch path accurate)
    logic lap_reset;         // LAP confidence reset after 256 accesses
    logic stall;             // a prefetch waited for the L1-I prefetch queue
    logic jump_sjt;          // a lookahead step used an SJT target
    logic jump_mjt;          // a lookahead step used an MJT target
    logic run_seq;           // a lookahead step used the sequential runner
    logic sjt_insert;        // a branch was inserted into the SJT
    logic to_mjt1;           // a branch migrated from the SJT to MJT-I
    logic to_mjt2;           // a branch migrated from MJT-I to MJT-II
    logic tt_insert;         // a leader/follower pair was written
    logic map_alloc;         // the access IP took a new mapper entry
  } jip_events_t;

  function automatic cline_t cline_of(cip_t c);
    return c[CIP_W-1:LINE_OFF_W];
  endfunction

endpackage
