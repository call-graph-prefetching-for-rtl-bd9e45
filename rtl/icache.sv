// icache: L1 instruction cache that the call graph prefetcher fills.
//
// 32KB, 2-way set associative, 32-byte lines, 1-cycle hit, as in the
// evaluated processor; the organisation below (LRU per set, blocking on a
// miss, whole-line responses) is this design's own. Prefetched lines go
// straight into this cache, no separate prefetch buffer.
//
// Demand port: fetch_valid/fetch_addr is taken when fetch_ready is high;
// on a hit the 32-byte line comes back on resp_* in the next cycle. On a
// miss the cache stops taking fetches, offers the line to the L2 request
// queue on miss_* until it is accepted (possibly merged with a prefetch of
// the same line already in flight), and answers the cycle after the line
// is present. Fill port: every line L2 returns (fill_*) is written into the
// set's invalid or least recently used way unless it is already present.
// Two probe ports answer, combinationally, whether a line is cached; the
// prefetchers use them to drop lines they need not fetch.
//
// Each line carries a "prefetched, not yet referenced" bit, giving the
// three prefetch outcomes: st_pf_hit (first reference finds the prefetched
// line present), st_delayed_hit (a demand miss finds its line still on the
// way from L2 as a prefetch) and st_pf_useless (a prefetched line is
// replaced before any reference).
module icache
  import cgp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768
) (
  input  logic       clk,
  input  logic       rst_n,
  // demand fetch
  input  logic       fetch_valid,
  input  addr_t      fetch_addr,
  output logic       fetch_ready,
  output logic       resp_valid,
  output addr_t      resp_addr,
  output line_data_t resp_data,
  // miss request to the L2 request queue
  output logic       miss_valid,
  output line_t      miss_line,
  input  logic       miss_ready,
  input  logic       miss_dup,
  input  req_src_e   miss_dup_src,
  // line fill from L2
  input  logic       fill_valid,
  input  line_t      fill_line,
  input  req_src_e   fill_src,
  input  line_data_t fill_data,
  // tag probes for the prefetchers
  input  line_t      probe_a_line,
  output logic       probe_a_hit,
  input  line_t      probe_b_line,
  output logic       probe_b_hit,
  // events
  output logic       st_hit,
  output logic       st_miss,
  output logic       st_pf_hit,
  output logic       st_delayed_hit,
  output logic       st_pf_useless
);

  localparam int unsigned WAYS  = 2;
  localparam int unsigned SETS  = CACHE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = LINE_W - SET_W;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;

  tag_t             tag_m  [WAYS][SETS];
  line_data_t       data_m [WAYS][SETS];
  logic [SETS-1:0]  vld_q  [WAYS];
  logic [SETS-1:0]  pfb_q  [WAYS];   // prefetched, not yet referenced
  logic [SETS-1:0]  lru_q;           // way to replace next

  function automatic set_t set_of(line_t l);
    return l[SET_W-1:0];
  endfunction
  function automatic tag_t tag_of(line_t l);
    return l[LINE_W-1:SET_W];
  endfunction

  // hit vector of a line
  function automatic logic [WAYS-1:0] lookup(line_t l);
    logic [WAYS-1:0] h;
    for (int w = 0; w < WAYS; w++)
      h[w] = vld_q[w][set_of(l)] && (tag_m[w][set_of(l)] == tag_of(l));
    return h;
  endfunction

  assign probe_a_hit = |lookup(probe_a_line);
  assign probe_b_hit = |lookup(probe_b_line);

  // ------------------------------------------------------------- demand
  typedef enum logic {C_IDLE, C_MISS} cstate_e;
  cstate_e state_q;
  line_t   mline_q;
  addr_t   maddr_q;
  logic    sent_q;

  line_t           dline;
  set_t            dset;
  logic [WAYS-1:0] dhit_v;
  logic            dhit, dway;
  assign dline  = (state_q == C_IDLE) ? line_of(fetch_addr) : mline_q;
  assign dset   = set_of(dline);
  assign dhit_v = lookup(dline);
  assign dhit   = |dhit_v;
  assign dway   = dhit_v[1];

  logic dacc;     // a demand access completes this cycle
  assign fetch_ready = (state_q == C_IDLE);
  assign dacc        = (state_q == C_IDLE) ? (fetch_valid && dhit) : dhit;

  assign st_hit         = (state_q == C_IDLE) && fetch_valid && dhit;
  assign st_miss        = (state_q == C_IDLE) && fetch_valid && !dhit;
  assign st_pf_hit      = st_hit && pfb_q[dway][dset];
  assign miss_valid     = (state_q == C_MISS) && !dhit && !sent_q;
  assign miss_line      = mline_q;
  assign st_delayed_hit = miss_valid && miss_dup && (miss_dup_src != SRC_DEMAND);

  // --------------------------------------------------------------- fill
  set_t            fset;
  logic            fpresent, fway;
  assign fset     = set_of(fill_line);
  assign fpresent = |lookup(fill_line);
  always_comb begin
    if      (!vld_q[0][fset]) fway = 1'b0;
    else if (!vld_q[1][fset]) fway = 1'b1;
    else                      fway = lru_q[fset];
  end
  logic fwrite;
  assign fwrite        = fill_valid && !fpresent;
  assign st_pf_useless = fwrite && vld_q[fway][fset] && pfb_q[fway][fset];

  always_ff @(posedge clk) begin
    if (fwrite) begin
      tag_m[fway][fset]  <= tag_of(fill_line);
      data_m[fway][fset] <= fill_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= C_IDLE;
      mline_q    <= '0;
      maddr_q    <= '0;
      sent_q     <= 1'b0;
      resp_valid <= 1'b0;
      resp_addr  <= '0;
      resp_data  <= '0;
      lru_q      <= '0;
      for (int w = 0; w < WAYS; w++) begin
        vld_q[w] <= '0;
        pfb_q[w] <= '0;
      end
    end else begin
      resp_valid <= dacc;
      if (dacc) begin
        resp_addr           <= (state_q == C_IDLE) ? fetch_addr : maddr_q;
        resp_data           <= data_m[dway][dset];
        lru_q[dset]         <= ~dway;
        pfb_q[dway][dset]   <= 1'b0;
      end
      unique case (state_q)
        C_IDLE: if (fetch_valid && !dhit) begin
          state_q <= C_MISS;
          mline_q <= line_of(fetch_addr);
          maddr_q <= fetch_addr;
          sent_q  <= 1'b0;
        end
        C_MISS: begin
          if (dhit)                          state_q <= C_IDLE;
          else if (miss_valid && miss_ready) sent_q  <= 1'b1;
        end
        default: state_q <= C_IDLE;
      endcase
      // a fill takes precedence over the demand access for its set
      if (fwrite) begin
        vld_q[fway][fset] <= 1'b1;
        pfb_q[fway][fset] <= (fill_src != SRC_DEMAND);
        lru_q[fset]       <= ~fway;
      end
    end
  end

endmodule
