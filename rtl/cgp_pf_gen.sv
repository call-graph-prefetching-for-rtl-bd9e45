// cgp_pf_gen: N-line prefetch burst generator (the "CGP_N" burst).
//
// Given a start address, it requests the N consecutive cache lines that
// begin with the line holding that address - for a CGHC prediction, the
// first N lines of the predicted callee; the rest of the callee is left to
// next-line prefetching once it runs. One line is handled per cycle: the
// line is first looked up in the I-cache through the probe port, and a line
// that is already cached is dropped without a request (skip pulse);
// otherwise req_valid is held until req_ready. A new start replaces the
// rest of an unfinished burst (a choice of this design: the newest
// prediction is the most useful one).
//
// Timing: start in cycle t, first line probed and requested in cycle t+1,
// then one line per cycle while req_ready is high. N defaults to 4 (CGP_4,
// the configuration evaluated in most detail).
module cgp_pf_gen
  import cgp_pkg::*;
#(
  parameter int unsigned N_LINES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_valid,
  input  addr_t start_addr,
  // I-cache tag probe
  output line_t probe_line,
  input  logic  probe_hit,
  // request towards the L2 request queue
  output logic  req_valid,
  output line_t req_line,
  input  logic  req_ready,
  output logic  skip,
  output logic  active
);

  localparam int unsigned CW = $clog2(N_LINES + 1);

  line_t          line_q;
  logic [CW-1:0]  left_q;
  logic           advance;

  assign active     = (left_q != 0);
  assign probe_line = line_q;
  assign req_line   = line_q;
  assign req_valid  = active && !probe_hit;
  assign skip       = active && probe_hit;
  assign advance    = skip || (req_valid && req_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q <= '0;
      left_q <= '0;
    end else if (start_valid) begin
      line_q <= line_of(start_addr);
      left_q <= CW'(N_LINES);
    end else if (advance) begin
      line_q <= line_q + 1'b1;
      left_q <= left_q - 1'b1;
    end
  end

endmodule
