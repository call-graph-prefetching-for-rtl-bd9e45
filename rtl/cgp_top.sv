// cgp_top: call graph prefetcher (CGP) with its L1 instruction cache.
//
// Function call sequences in layered software are highly repeatable, so
// this prefetcher remembers, per function, which functions it called last
// time and prefetches the next one before it is called:
//   cgp_ras        modified return address stack: turns predicted calls and
//                  returns into CGHC events carrying function start addresses
//   cghc_ctrl      two-level Call Graph History Cache (2KB + 32KB) and its
//                  prefetch/update access sequence
//   cgp_pf_gen     prefetches the first CGP_N lines of each predicted callee
//   nl_prefetcher  next-NL_N-line prefetching inside the running function
//   icache         32KB 2-way L1 I-cache that receives all prefetches
//   l2_req_queue   one FIFO to L2 for demand misses and prefetches, no
//                  priority, merging requests for lines already in flight
// Requests enter the queue through a fixed-priority arbiter: demand miss,
// then CGHC prefetch, then NL prefetch (the order is this design's choice;
// once queued, L2 serves them in arrival order).
//
// Interface: the branch predictor side gives call_valid (with predicted
// target and return address) or ret_valid, one per cycle; the return
// prediction with the caller's start address comes back from the stack.
// The fetch unit uses fetch_* / resp_* (see icache). L2 is reached through
// l2_req_* (valid/ready, line address) and l2_resp_* (in order). stat
// carries one-cycle event pulses for performance counting.
module cgp_top
  import cgp_pkg::*;
#(
  parameter int unsigned CGP_N       = 4,      // lines per CGHC prefetch
  parameter int unsigned NL_N        = 4,      // lines per NL prefetch
  parameter int unsigned L1_ENTRIES  = 64,     // 2KB first-level CGHC
  parameter int unsigned L2_ENTRIES  = 1024,   // 32KB second-level CGHC
  parameter int unsigned CGHC_L2_LAT = 16,     // second-level CGHC access time
  parameter int unsigned RAS_DEPTH   = 16,
  parameter int unsigned EVQ_DEPTH   = 4,
  parameter int unsigned QDEPTH      = 8,
  parameter int unsigned CACHE_BYTES = 32768
) (
  input  logic       clk,
  input  logic       rst_n,
  // branch predictor
  input  logic       call_valid,
  input  addr_t      call_target,
  input  addr_t      call_ret_addr,
  input  logic       ret_valid,
  output logic       ret_pred_valid,
  output addr_t      ret_pred_addr,
  // fetch unit
  input  logic       fetch_valid,
  input  addr_t      fetch_addr,
  output logic       fetch_ready,
  output logic       resp_valid,
  output addr_t      resp_addr,
  output line_data_t resp_data,
  // L2
  output logic       l2_req_valid,
  output line_t      l2_req_line,
  input  logic       l2_req_ready,
  input  logic       l2_resp_valid,
  input  line_data_t l2_resp_data,
  // events
  output cgp_stat_t  stat
);

  // ------------------------------------------------- call graph history
  logic       ev_valid;
  cgp_event_t ev;

  cgp_ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .call_valid, .call_target, .call_ret_addr, .ret_valid,
    .ret_pred_valid, .ret_pred_addr,
    .cur_func(), .cur_func_valid(),
    .ev_valid, .ev);

  logic  pf_valid;
  addr_t pf_addr;

  cghc_ctrl #(
    .L1_ENTRIES(L1_ENTRIES), .L2_ENTRIES(L2_ENTRIES),
    .L2_LAT(CGHC_L2_LAT), .EVQ_DEPTH(EVQ_DEPTH)
  ) u_cghc (
    .clk, .rst_n,
    .ev_valid, .ev, .ev_drop(stat.ev_drop),
    .pf_valid, .pf_addr,
    .st_l1_hit(stat.cghc_l1_hit), .st_l2_hit(stat.cghc_l2_hit),
    .st_alloc(stat.cghc_alloc), .busy());

  assign stat.cghc_pf = pf_valid;

  // -------------------------------------------------------- prefetchers
  line_t probe_a_line, probe_b_line;
  logic  probe_a_hit, probe_b_hit;
  logic  cg_req_valid, cg_req_ready, cg_skip;
  line_t cg_req_line;
  logic  nl_req_valid, nl_req_ready, nl_skip;
  line_t nl_req_line;

  cgp_pf_gen #(.N_LINES(CGP_N)) u_cgp_gen (
    .clk, .rst_n,
    .start_valid(pf_valid), .start_addr(pf_addr),
    .probe_line(probe_a_line), .probe_hit(probe_a_hit),
    .req_valid(cg_req_valid), .req_line(cg_req_line), .req_ready(cg_req_ready),
    .skip(cg_skip), .active());

  nl_prefetcher #(.N_LINES(NL_N)) u_nl (
    .clk, .rst_n,
    .fetch_valid(fetch_valid && fetch_ready), .fetch_addr,
    .probe_line(probe_b_line), .probe_hit(probe_b_hit),
    .req_valid(nl_req_valid), .req_line(nl_req_line), .req_ready(nl_req_ready),
    .skip(nl_skip), .trigger());

  assign stat.pf_cached = cg_skip || nl_skip;

  // ------------------------------------------------------------ arbiter
  logic     miss_valid, miss_ready;
  line_t    miss_line;
  logic     q_in_valid, q_in_ready, q_in_dup;
  line_t    q_in_line;
  req_src_e q_in_src, q_dup_src;

  always_comb begin
    q_in_valid = 1'b1;
    q_in_line  = miss_line;
    q_in_src   = SRC_DEMAND;
    if (miss_valid) begin
      q_in_line = miss_line;
      q_in_src  = SRC_DEMAND;
    end else if (cg_req_valid) begin
      q_in_line = cg_req_line;
      q_in_src  = SRC_CGHC;
    end else if (nl_req_valid) begin
      q_in_line = nl_req_line;
      q_in_src  = SRC_NL;
    end else begin
      q_in_valid = 1'b0;
    end
  end

  assign miss_ready   = q_in_ready;
  assign cg_req_ready = q_in_ready && !miss_valid;
  assign nl_req_ready = q_in_ready && !miss_valid && !cg_req_valid;

  assign stat.cghc_req  = (q_in_src == SRC_CGHC) && q_in_valid && q_in_ready && !q_in_dup;
  assign stat.nl_req    = (q_in_src == SRC_NL)   && q_in_valid && q_in_ready && !q_in_dup;
  assign stat.pf_squash = (q_in_src != SRC_DEMAND) && q_in_dup;

  // ------------------------------------------------ queue and I-cache
  logic       fill_valid;
  line_t      fill_line;
  req_src_e   fill_src;
  line_data_t fill_data;

  l2_req_queue #(.DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .in_valid(q_in_valid), .in_line(q_in_line), .in_src(q_in_src),
    .in_ready(q_in_ready), .in_dup(q_in_dup), .in_dup_src(q_dup_src),
    .l2_req_valid, .l2_req_line, .l2_req_ready,
    .l2_resp_valid, .l2_resp_data,
    .fill_valid, .fill_line, .fill_src, .fill_data, .full());

  icache #(.CACHE_BYTES(CACHE_BYTES)) u_ic (
    .clk, .rst_n,
    .fetch_valid, .fetch_addr, .fetch_ready,
    .resp_valid, .resp_addr, .resp_data,
    .miss_valid, .miss_line, .miss_ready,
    .miss_dup(q_in_dup), .miss_dup_src(q_dup_src),
    .fill_valid, .fill_line, .fill_src, .fill_data,
    .probe_a_line, .probe_a_hit, .probe_b_line, .probe_b_hit,
    .st_hit(stat.ic_hit), .st_miss(stat.ic_miss), .st_pf_hit(stat.pf_hit),
    .st_delayed_hit(stat.delayed_hit), .st_pf_useless(stat.pf_useless));

endmodule
