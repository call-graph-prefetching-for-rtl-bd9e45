// tb_l2_req_queue: checks the request FIFO against a model queue under
// random traffic and a random-stalling L2 model: requests reach L2 in
// arrival order whatever their source, a request for a line already queued
// or in flight is merged (in_dup, with the source of the queued one),
// back-pressure when full, and fills carry the right line, source and data.
module tb_l2_req_queue;
  import cgp_pkg::*;

  localparam int unsigned DEPTH = 4, LAT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_ready, in_dup;
  line_t      in_line = '0;
  req_src_e   in_src = SRC_DEMAND, in_dup_src, fill_src;
  logic       l2_req_valid, l2_req_ready, l2_resp_valid, fill_valid, full;
  line_t      l2_req_line, fill_line;
  line_data_t l2_resp_data, fill_data;
  int unsigned n_l2;

  l2_req_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_line, .in_src, .in_ready, .in_dup,
    .in_dup_src, .l2_req_valid, .l2_req_line, .l2_req_ready, .l2_resp_valid, .l2_resp_data,
    .fill_valid, .fill_line, .fill_src, .fill_data, .full);

  l2_model #(.LAT(LAT), .STALL_PCT(30)) u_l2 (.clk, .rst_n, .req_valid(l2_req_valid),
    .req_line(l2_req_line), .req_ready(l2_req_ready), .resp_valid(l2_resp_valid),
    .resp_data(l2_resp_data), .n_req(n_l2));

  int unsigned checks = 0, failures = 0, n_dup = 0, n_full = 0, n_fill = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model: lines queued or in flight, oldest first, and lines sent to L2
  typedef struct { line_t line; req_src_e src; } ment_t;
  ment_t q [$];
  line_t sent [$];

  always @(posedge clk) if (rst_n) begin
    if (l2_req_valid && l2_req_ready) begin
      check(l2_req_line == q[sent.size()].line, "L2 sees requests in arrival order");
      sent.push_back(l2_req_line);
    end
    if (fill_valid) begin
      n_fill++;
      check(fill_line == q[0].line && fill_src == q[0].src, "fill line and source");
      check(fill_data == tb_pkg::line_pattern(fill_line), "fill data");
      void'(q.pop_front());
      void'(sent.pop_front());
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      automatic int hit = -1;
      @(negedge clk);
      in_valid = ($urandom_range(99) < 60);
      in_line  = line_t'($urandom_range(12));
      in_src   = req_src_e'($urandom_range(2));
      #1;
      foreach (q[i]) if (q[i].line == in_line) hit = i;
      if (in_valid) begin
        check(in_dup == (hit >= 0), "duplicate detection");
        if (hit >= 0) begin
          n_dup++;
          check(in_ready && in_dup_src == q[hit].src, "merge accepted with queued source");
        end else begin
          check(in_ready == (q.size() < DEPTH), "ready while not full");
          check(full == (q.size() == DEPTH), "full flag");
          if (q.size() == DEPTH) n_full++;
          else q.push_back('{line: in_line, src: in_src});
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (DEPTH * (LAT + 10)) @(negedge clk);
    check(q.size() == 0, "queue drains");
    check(n_dup > 100 && n_full > 100 && n_fill > 500,
          $sformatf("traffic mix: dup %0d full %0d fills %0d", n_dup, n_full, n_fill));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
