// nl_prefetcher: next-N-line prefetcher used within a function.
//
// When the fetch unit accesses a cache line L that differs from the line of
// its previous access, the next N lines L+1 .. L+N are prefetched unless
// they are already in the I-cache. Lines are walked one per cycle by a
// cgp_pf_gen burst engine, which does the cache probe; a new line replaces
// the rest of the previous burst. Lines already in flight are squashed
// further on, by the L2 request queue.
//
// Timing: fetch of a new line in cycle t, line L+1 probed/requested in
// cycle t+1, then one line per cycle while req_ready is high. N defaults
// to 4, the NL_4 / CGP_4 configuration.
module nl_prefetcher
  import cgp_pkg::*;
#(
  parameter int unsigned N_LINES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fetch_valid,     // demand fetch accepted this cycle
  input  addr_t fetch_addr,
  output line_t probe_line,
  input  logic  probe_hit,
  output logic  req_valid,
  output line_t req_line,
  input  logic  req_ready,
  output logic  skip,
  output logic  trigger
);

  line_t last_q;
  logic  last_vld_q;

  assign trigger = fetch_valid && !(last_vld_q && last_q == line_of(fetch_addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q     <= '0;
      last_vld_q <= 1'b0;
    end else if (fetch_valid) begin
      last_q     <= line_of(fetch_addr);
      last_vld_q <= 1'b1;
    end
  end

  addr_t next_addr;
  assign next_addr = {line_of(fetch_addr) + 1'b1, {LINE_OFF{1'b0}}};

  logic active_unused;

  cgp_pf_gen #(.N_LINES(N_LINES)) u_burst (
    .clk, .rst_n,
    .start_valid(trigger), .start_addr(next_addr),
    .probe_line, .probe_hit,
    .req_valid, .req_line, .req_ready,
    .skip, .active(active_unused));

endmodule
