// l2_model: behavioural model of the L2 cache seen by the I-cache (not
// synthesizable). Accepts one line request per cycle while ready, and
// returns each line LAT cycles after it was accepted, in request order.
// A line's contents are a fixed function of its address (line_pattern in
// tb_pkg), so a testbench can check every word it receives. STALL_PCT
// withholds ready on that percentage of cycles.
module l2_model
  import cgp_pkg::*;
#(
  parameter int unsigned LAT       = 16,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  line_t      req_line,
  output logic       req_ready,
  output logic       resp_valid,
  output line_data_t resp_data,
  output int unsigned n_req
);

  line_t       pend_line [$];
  int unsigned pend_due  [$];
  int unsigned cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_ready <= 1'b1;
    else        req_ready <= ($urandom_range(99) >= STALL_PCT);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc        <= 0;
      n_req      <= 0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      pend_line.delete();
      pend_due.delete();
    end else begin
      cyc <= cyc + 1;
      if (req_valid && req_ready) begin
        pend_line.push_back(req_line);
        pend_due.push_back(cyc + LAT - 1);
        n_req <= n_req + 1;
      end
      if (pend_due.size() > 0 && pend_due[0] <= cyc) begin
        resp_valid <= 1'b1;
        resp_data  <= tb_pkg::line_pattern(pend_line[0]);
        void'(pend_line.pop_front());
        void'(pend_due.pop_front());
      end else begin
        resp_valid <= 1'b0;
      end
    end
  end

endmodule
