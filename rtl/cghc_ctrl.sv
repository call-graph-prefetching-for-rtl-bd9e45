// cghc_ctrl: the CGHC engine of the call graph prefetcher.
//
// Every call and every return reaches this block as one cgp_event_t and
// causes two CGHC accesses, in different cycles so that the CGHC needs only
// one port:
//   call P->F   call_prefetch : look up F; on a hit prefetch F's slot 1
//               call_update   : look up P; write F into the slot selected by
//                               P's index, then increment the index (max 8)
//   return F->P return_prefetch: look up P; on a hit prefetch the slot
//                               selected by P's index
//               return_update : look up F; reset F's index to 1
// A lookup that misses in both CGHC levels issues no prefetch and creates a
// new entry with index 1 and all slots invalid; for call_update the new
// entry of P gets F in slot 1 (so its index moves on to 2 - the index is
// described as starting at 1, and it is advanced here because slot 1 has
// been filled, as for any other call_update).
//
// Two levels (first level L1_ENTRIES, second level L2_ENTRIES, both direct
// mapped). A first-level miss reads the second level, which answers
// L2_LAT cycles after the first-level access. On a second-level hit the
// entry moves into the first level; on a miss a new entry is created there;
// either way the displaced first-level entry is written back to the second
// level. A second-level hit on a prefetch access also issues the prefetch
// (a choice of this design). The second-level copy of a moved entry is left
// in place: it can only be read again after the entry has left the first
// level, and that writes the newer copy over it.
//
// Timing with no backlog, event accepted in cycle t (the cycle after the
// branch predictor's prediction, since cgp_ras registers it):
//   t   prefetch access (tag match)     t+1 pf_valid (prefetch issued)
//   t+2 update access (read-modify-write of the first level)
// Each second-level access adds L2_LAT cycles. Events that arrive while the
// engine is busy wait in an EVQ_DEPTH-entry FIFO; when it is full they are
// dropped (ev_drop), since the CGHC only guides prefetching.
//
// Once all eight slots of an entry are written (full), further calls are
// not recorded until the function returns ("only the first 8 functions
// invoked are stored"); the index stays at its maximum of 8.
module cghc_ctrl
  import cgp_pkg::*;
#(
  parameter int unsigned L1_ENTRIES = 64,    // 2KB first-level CGHC
  parameter int unsigned L2_ENTRIES = 1024,  // 32KB second-level CGHC
  parameter int unsigned L2_LAT     = 16,    // second-level access time
  parameter int unsigned EVQ_DEPTH  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // calls and returns from the modified branch predictor
  input  logic       ev_valid,
  input  cgp_event_t ev,
  output logic       ev_drop,
  // prefetch of a function's first lines
  output logic       pf_valid,
  output addr_t      pf_addr,
  // activity, one-cycle pulses
  output logic       st_l1_hit,
  output logic       st_l2_hit,
  output logic       st_alloc,
  output logic       busy
);

  // ---------------------------------------------------------------- queue
  localparam int unsigned QW = (EVQ_DEPTH > 1) ? $clog2(EVQ_DEPTH) : 1;

  cgp_event_t          q_mem [EVQ_DEPTH];
  logic [QW-1:0]       q_rd, q_wr;
  logic [QW:0]         q_cnt;
  logic                take;          // engine takes an event this cycle
  logic                take_bypass;   // ... straight from the input
  logic                q_push, q_pop;
  cgp_event_t          head;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_UPD, S_L2} state_e;
  typedef enum logic {PH_PF, PH_UPD} phase_e;

  state_e     state_q;
  phase_e     phase_q;
  cgp_event_t cur_q;
  logic [$clog2(L2_LAT+1)-1:0] cnt_q;

  assign take        = (state_q == S_IDLE) && (q_cnt != 0 || ev_valid);
  assign take_bypass = take && (q_cnt == 0);
  assign head        = (q_cnt != 0) ? q_mem[q_rd] : ev;
  assign q_pop       = take && !take_bypass;
  assign q_push      = ev_valid && !take_bypass && (q_cnt < (QW+1)'(EVQ_DEPTH) || q_pop);
  assign ev_drop     = ev_valid && !take_bypass && !(q_cnt < (QW+1)'(EVQ_DEPTH) || q_pop);

  function automatic logic [QW-1:0] q_next(logic [QW-1:0] p);
    return (p == QW'(EVQ_DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_rd  <= '0;
      q_wr  <= '0;
      q_cnt <= '0;
    end else begin
      if (q_push) q_wr <= q_next(q_wr);
      if (q_pop)  q_rd <= q_next(q_rd);
      q_cnt <= q_cnt + (QW+1)'(q_push) - (QW+1)'(q_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (q_push) q_mem[q_wr] <= ev;
  end

  // --------------------------------------------------------------- arrays
  addr_t       l1_key, l2_key;
  cghc_entry_t l1_rd, l2_rd, l1_wr, l2_wr;
  logic        l1_hit, l2_hit, l1_we, l2_we;

  cghc_store #(.ENTRIES(L1_ENTRIES)) u_l1 (
    .clk, .rst_n, .rd_key(l1_key), .rd_entry(l1_rd), .rd_hit(l1_hit),
    .wr_en(l1_we), .wr_entry(l1_wr));

  cghc_store #(.ENTRIES(L2_ENTRIES)) u_l2 (
    .clk, .rst_n, .rd_key(l2_key), .rd_entry(l2_rd), .rd_hit(l2_hit),
    .wr_en(l2_we), .wr_entry(l2_wr));

  // ----------------------------------------------------- entry operations
  function automatic cghc_entry_t fresh_entry(addr_t f);
    cghc_entry_t e;
    e            = '0;
    e.valid      = 1'b1;
    e.func       = f;
    e.index      = index_t'(1);
    return e;
  endfunction

  // call_update (record callee) or return_update (reset the index)
  function automatic cghc_entry_t update_entry(cghc_entry_t e, ev_kind_e k, addr_t callee);
    cghc_entry_t r;
    logic [$clog2(SLOTS)-1:0] s;
    r = e;
    s = $clog2(SLOTS)'(e.index - 1'b1);
    if (k == EV_RET) begin
      r.index = index_t'(1);
      r.full  = 1'b0;
    end else if (!e.full) begin
      r.slot[s]       = callee;
      r.slot_valid[s] = 1'b1;
      if (e.index == index_t'(SLOTS)) r.full  = 1'b1;
      else                            r.index = e.index + 1'b1;
    end
    return r;
  endfunction

  // which callee to prefetch from a hit entry
  function automatic logic pf_sel(cghc_entry_t e, ev_kind_e k, output addr_t a);
    logic [$clog2(SLOTS)-1:0] s;
    s = (k == EV_CALL) ? '0 : $clog2(SLOTS)'(e.index - 1'b1);
    a = e.slot[s];
    return e.slot_valid[s] && !(k == EV_RET && e.full);
  endfunction

  // ------------------------------------------------------------------ FSM
  addr_t cur_key;
  assign cur_key = (phase_q == PH_PF) ? cur_q.pf_key : cur_q.upd_key;

  cghc_entry_t moved;     // entry placed in the first level by the swap
  logic        swap;      // last cycle of a second-level access
  assign swap = (state_q == S_L2) && (cnt_q == 0);
  logic        pf_n;
  addr_t       pf_a;

  always_comb begin
    l1_key = cur_key;
    l2_key = cur_key;
    l1_we  = 1'b0;
    l2_we  = 1'b0;
    l1_wr  = l1_rd;
    l2_wr  = l1_rd;       // victim write-back
    moved  = l2_hit ? l2_rd : fresh_entry(cur_key);
    pf_n   = 1'b0;
    pf_a   = '0;
    unique case (state_q)
      S_IDLE: begin
        l1_key = head.pf_key;
        if (take && head.pf_vld && l1_hit)
          pf_n = pf_sel(l1_rd, head.kind, pf_a);
      end
      S_UPD: begin
        if (l1_hit) begin
          l1_we = 1'b1;
          l1_wr = update_entry(l1_rd, cur_q.kind, cur_q.pf_key);
        end
      end
      S_L2: if (swap) begin
        l1_we = 1'b1;
        l1_wr = (phase_q == PH_UPD) ? update_entry(moved, cur_q.kind, cur_q.pf_key) : moved;
        l2_we = l1_rd.valid;
        if (phase_q == PH_PF && l2_hit)
          pf_n = pf_sel(l2_rd, cur_q.kind, pf_a);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      phase_q  <= PH_PF;
      cur_q    <= '0;
      cnt_q    <= '0;
      pf_valid <= 1'b0;
      pf_addr  <= '0;
    end else begin
      pf_valid <= pf_n;
      if (pf_n) pf_addr <= pf_a;
      unique case (state_q)
        S_IDLE: if (take) begin
          cur_q   <= head;
          phase_q <= head.pf_vld ? PH_PF : PH_UPD;
          if (!head.pf_vld)      state_q <= head.upd_vld ? S_UPD : S_IDLE;
          else if (l1_hit)       state_q <= S_ISSUE;
          else begin
            state_q <= S_L2;
            cnt_q   <= ($bits(cnt_q))'(L2_LAT - 1);
          end
        end
        S_ISSUE: begin
          phase_q <= PH_UPD;
          state_q <= cur_q.upd_vld ? S_UPD : S_IDLE;
        end
        S_UPD: begin
          if (l1_hit) state_q <= S_IDLE;
          else begin
            state_q <= S_L2;
            cnt_q   <= ($bits(cnt_q))'(L2_LAT - 1);
          end
        end
        S_L2: begin
          if (!swap)                 cnt_q   <= cnt_q - 1'b1;
          else if (phase_q == PH_PF) state_q <= S_ISSUE;
          else                       state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign st_l1_hit = ((state_q == S_IDLE && take && head.pf_vld) || state_q == S_UPD) && l1_hit;
  assign st_l2_hit = swap && l2_hit;
  assign st_alloc  = swap && !l2_hit;
  assign busy      = (state_q != S_IDLE) || (q_cnt != 0);

endmodule
