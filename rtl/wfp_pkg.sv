// wfp_pkg: types and constants shared by the way-footprint prediction front end.
//
// A way-footprint says which ways of the set-associative instruction cache a
// fetch has to enable.  For an IC_WAYS-way cache it takes IC_WAYS+1 values:
// one per way (one-way access) and one for "all ways".  It is therefore
// clog2(IC_WAYS+1) bits wide, 3 bits for the 4-way cache.  Values 0..IC_WAYS-1
// name a single way; WF_ALL (= IC_WAYS) means all-way access.  Any other code
// is treated as all-way as well.
//
// Fetch addresses are byte addresses of 4-byte instructions.  One fetch
// address is predicted, fetched and queued per cycle.
package wfp_pkg;

  parameter int unsigned ADDR_W      = 32;
  parameter int unsigned INSTR_BYTES = 4;
  parameter int unsigned IC_WAYS     = 4;   // ways of the instruction cache
  parameter int unsigned LINE_BYTES  = 32;  // instruction cache line size
  parameter int unsigned WF_W        = $clog2(IC_WAYS + 1);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WF_W-1:0]   wf_t;

  localparam wf_t WF_ALL = wf_t'(IC_WAYS);

  // Kind of the instruction a BTB entry was allocated for.
  typedef enum logic [2:0] {
    K_OTHER = 3'd0,   // non-branch (AFA policy)
    K_COND  = 3'd1,   // conditional branch
    K_JUMP  = 3'd2,   // unconditional direct jump
    K_CALL  = 3'd3,   // call
    K_RET   = 3'd4    // return
  } br_kind_e;

  // BTB allocation policies.
  typedef enum logic [1:0] {
    POL_TB  = 2'd0,   // taken branches missing from the BTB
    POL_AB  = 2'd1,   // any branch missing from the BTB
    POL_AFA = 2'd2    // any fetch address missing from the BTB
  } alloc_policy_e;

  // One entry of the way-footprint queue.
  typedef struct packed {
    addr_t addr;            // fetch address
    wf_t   wf;              // way that delivered the fetch
    logic  is_cache_miss;   // fetch missed (in the predicted way or in the cache)
    logic  is_call;
    logic  is_btb_alloc;
    logic  is_br_miss_pred;
    logic  is_taken;
  } wfq_entry_t;

  // What the back end reports for one committed instruction.
  typedef struct packed {
    logic     valid;
    addr_t    pc;
    br_kind_e kind;        // K_OTHER for non-branches
    logic     taken;       // branch went to its target
    addr_t    next_pc;     // actual next fetch address
    logic     miss_pred;   // predicted next fetch address was wrong
  } commit_t;

  // Event counters of the front end.
  typedef struct packed {
    logic [31:0] fetches;        // fetches delivered
    logic [31:0] one_way;        // one-way cache accesses
    logic [31:0] all_way;        // all-way cache accesses
    logic [31:0] wft_reads;      // WFT reads (one per prediction)
    logic [31:0] way_replays;    // one-way access that missed its way
    logic [31:0] cache_misses;   // refills
    logic [31:0] btb_allocs;
    logic [31:0] wft_updates;
    logic [31:0] ras_wf_updates;
    logic [31:0] ras_predictions;
    logic [31:0] flushes;        // mispredictions seen at commit
    logic [31:0] stall_cycles;   // fetch held by back end or full queue
  } perf_t;

  function automatic logic wf_is_one_way(wf_t wf);
    return wf < wf_t'(IC_WAYS);
  endfunction

endpackage
