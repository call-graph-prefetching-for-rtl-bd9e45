// cgp_pkg: types and constants shared by the call graph prefetcher.
//
// Addresses are 32-bit byte addresses: eight function start addresses fill
// one 32-byte line, which is how a CGHC data-array entry is sized. Cache
// lines are 32 bytes, so a line address is the byte address without its
// low five bits. A CGHC entry holds the start address of a function F (the
// tag), the index of the next call slot, and the start addresses of up to
// eight functions that F called during its most recent invocation.
package cgp_pkg;

  localparam int unsigned ADDR_W     = 32;  // function address width
  localparam int unsigned LINE_BYTES = 32;  // I-cache and CGHC line size
  localparam int unsigned LINE_OFF   = $clog2(LINE_BYTES);
  localparam int unsigned LINE_W     = ADDR_W - LINE_OFF;
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned SLOTS      = 8;   // callees remembered per function
  localparam int unsigned INDEX_W    = $clog2(SLOTS) + 1;  // holds 1..SLOTS

  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [LINE_W-1:0]    line_t;
  typedef logic [LINE_BITS-1:0] line_data_t;
  typedef logic [INDEX_W-1:0]   index_t;

  // One CGHC entry: tag array part (valid, func, index, full) and data
  // array part (per-slot valid bits and callee start addresses). Slot k of
  // the data array is selected by index value k+1.
  typedef struct packed {
    logic                  valid;
    addr_t                 func;        // start address of the function
    index_t                index;       // 1..SLOTS, next slot to fill / predict
    logic                  full;        // all SLOTS slots written this call
    logic [SLOTS-1:0]      slot_valid;
    addr_t [SLOTS-1:0]     slot;        // callee start addresses
  } cghc_entry_t;

  // A call or return as seen by the CGHC engine.
  //   call   P -> F : pf_key = F (look up F, prefetch its slot 1)
  //                   upd_key = P (record F in P's current slot)
  //   return F -> P : pf_key = P (prefetch P's slot at its index)
  //                   upd_key = F (reset F's index to 1)
  typedef enum logic {EV_CALL = 1'b0, EV_RET = 1'b1} ev_kind_e;

  typedef struct packed {
    ev_kind_e kind;
    logic     pf_vld;   // pf_key is known
    addr_t    pf_key;
    logic     upd_vld;  // upd_key is known
    addr_t    upd_key;
  } cgp_event_t;

  // Who asked for a line from L2.
  typedef enum logic [1:0] {SRC_DEMAND = 2'd0, SRC_CGHC = 2'd1, SRC_NL = 2'd2} req_src_e;

  // One-cycle event pulses brought out of the prefetcher for counting.
  typedef struct packed {
    logic ic_hit;        // demand fetch hit
    logic ic_miss;       // demand fetch miss
    logic pf_hit;        // first reference to a prefetched line hit
    logic delayed_hit;   // demand miss on a prefetch still in flight
    logic pf_useless;    // prefetched line replaced before any reference
    logic cghc_pf;       // CGHC predicted a callee (prefetch issued)
    logic cghc_req;      // CGHC line request entered the L2 queue
    logic nl_req;        // NL line request entered the L2 queue
    logic pf_squash;     // prefetch merged with a request already in flight
    logic pf_cached;     // prefetch dropped, line already cached
    logic cghc_l1_hit;   // CGHC first-level hit
    logic cghc_l2_hit;   // CGHC second-level hit (entry moved up)
    logic cghc_alloc;    // CGHC miss in both levels (entry created)
    logic ev_drop;       // call/return dropped, CGHC engine backlog full
  } cgp_stat_t;

  function automatic line_t line_of(addr_t a);
    return a[ADDR_W-1:LINE_OFF];
  endfunction

endpackage
