// l2_req_queue: the L1 I-cache's single path to L2.
//
// Demand misses and prefetches (from the CGHC and from next-line
// prefetching) share one FIFO and are served by L2 strictly in arrival
// order, with no priority for demand misses. An entry stays in the queue
// from its arrival until L2 returns its line, so the queue also knows
// every line in flight: a request for a line that is already queued or
// outstanding is accepted but not entered again (in_dup). That is how a
// next-line prefetch of a line the CGHC already asked for is squashed, and
// how a demand miss on a line still on its way becomes a delayed hit.
//
// Interface: in_valid/in_ready with in_line and in_src; l2_req_* is a
// valid/ready request to L2 carrying the line address; L2 answers each
// request, in order, with one l2_resp_valid cycle carrying the line data,
// which leaves as fill_* (with the line address and source) in the same
// cycle. Entries: DEPTH (this design's choice). A request is accepted the
// cycle it is offered when there is room or it is a duplicate, and is
// offered to L2 from the next cycle on.
module l2_req_queue
  import cgp_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // requests from the I-cache side
  input  logic       in_valid,
  input  line_t      in_line,
  input  req_src_e   in_src,
  output logic       in_ready,
  output logic       in_dup,       // accepted, merged with a queued request
  output req_src_e   in_dup_src,   // source of the queued request it matched
  // L2 request port
  output logic       l2_req_valid,
  output line_t      l2_req_line,
  input  logic       l2_req_ready,
  // L2 response port, in request order
  input  logic       l2_resp_valid,
  input  line_data_t l2_resp_data,
  // fill towards the I-cache
  output logic       fill_valid,
  output line_t      fill_line,
  output req_src_e   fill_src,
  output line_data_t fill_data,
  output logic       full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    line_t    line;
    req_src_e src;
  } qent_t;

  qent_t              mem [DEPTH];
  logic [DEPTH-1:0]   vld_q;
  logic [PW-1:0]      head_q, iss_q, tail_q;
  logic [PW:0]        cnt_q, icnt_q;    // queued, issued-but-unanswered

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  // duplicate search over every queued or outstanding entry
  logic dup_hit;
  always_comb begin
    dup_hit    = 1'b0;
    in_dup_src = SRC_DEMAND;
    for (int i = 0; i < DEPTH; i++) begin
      if (vld_q[i] && mem[i].line == in_line) begin
        dup_hit    = 1'b1;
        in_dup_src = mem[i].src;
      end
    end
  end

  assign full     = (cnt_q == (PW+1)'(DEPTH));
  assign in_ready = dup_hit || !full;
  assign in_dup   = in_valid && dup_hit;

  logic alloc, issue, retire;
  assign alloc  = in_valid && !dup_hit && !full;
  assign l2_req_valid = (cnt_q != icnt_q);
  assign l2_req_line  = mem[iss_q].line;
  assign issue  = l2_req_valid && l2_req_ready;
  assign retire = l2_resp_valid;

  assign fill_valid = l2_resp_valid;
  assign fill_line  = mem[head_q].line;
  assign fill_src   = mem[head_q].src;
  assign fill_data  = l2_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q  <= '0;
      head_q <= '0;
      iss_q  <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      icnt_q <= '0;
    end else begin
      if (alloc) begin
        tail_q        <= nxt(tail_q);
        vld_q[tail_q] <= 1'b1;
      end
      if (issue) iss_q <= nxt(iss_q);
      if (retire) begin
        head_q        <= nxt(head_q);
        vld_q[head_q] <= 1'b0;
      end
      cnt_q  <= cnt_q  + (PW+1)'(alloc) - (PW+1)'(retire);
      icnt_q <= icnt_q + (PW+1)'(issue) - (PW+1)'(retire);
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) mem[tail_q] <= '{line: in_line, src: in_src};
  end

  // L2 answers only requests it has taken
  assert property (@(posedge clk) disable iff (!rst_n) l2_resp_valid |-> (icnt_q != 0));

endmodule
