// Shared types of the hybrid static/dynamic L1 data cache.
//
// The cache keeps way-0 of every set in static (6T) cells and ways 1..n-1 in
// dynamic (1T1C) cells of the same n-bit macrocell. This package holds what
// several modules agree on: the writeback policy selector, the kind of a
// writeback sent to L2 and the one-cycle event pulses that the controller
// raises for each mechanism, so that a testbench or a performance counter can
// count them. The two writeback policies and the three writeback kinds are the
// ones the design defines; the encodings are this implementation's own.
package hdc_pkg;

  // Which policy keeps dirty data safe without refresh.
  //  WB_DELAYED : dirty blocks may move into dynamic ways; a global interval
  //               counter visits every dynamic block before its charge is gone
  //               and writes a dirty one back (the default policy).
  //  WB_EARLY   : a dirty static block is written back whenever it is moved
  //               into a dynamic way, so dynamic ways never hold dirty data.
  typedef enum logic {
    WB_DELAYED = 1'b0,
    WB_EARLY   = 1'b1
  } wb_policy_e;

  // Why a block is written back to L2.
  typedef enum logic [1:0] {
    WBK_REPLACEMENT = 2'd0,  // dirty block leaving on a miss (victim, or the static
                             // block under the early policy)
    WBK_SWAP        = 2'd1,  // early policy: dirty static block moved down by a dynamic hit
    WBK_SPORADIC    = 2'd2   // delayed policy: found dirty by the interval counter
  } wb_kind_e;

  // One-cycle pulses, one per mechanism of the cache.
  typedef struct packed {
    logic static_hit;     // access satisfied by way-0 in one cycle
    logic dynamic_hit;    // access hit a dynamic way: destructive read + swap
    logic miss;           // access missed: static block moved down, line filled
    logic s2d_move;       // internal static-to-dynamic transfer through the bridge
    logic wb_replacement; // writeback caused by a miss
    logic wb_swap;        // writeback caused by a dynamic-hit swap (early policy)
    logic wb_sporadic;    // writeback started by the interval counter
    logic sweep_check;    // interval counter visited a dynamic block
    logic sentry_expired; // a matching tag was ignored because its sentry had lost charge
  } hdc_events_t;

endpackage
