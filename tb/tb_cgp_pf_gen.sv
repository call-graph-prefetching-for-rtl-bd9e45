// tb_cgp_pf_gen: checks the N-line burst: the lines requested after a
// start, in order, with cached lines dropped, under random back-pressure;
// the one-cycle start-to-request timing; and that a new start replaces an
// unfinished burst.
module tb_cgp_pf_gen;
  import cgp_pkg::*;

  localparam int unsigned N = 4;

  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  start_valid = 0, req_ready = 0, probe_hit;
  addr_t start_addr = '0;
  line_t probe_line, req_line;
  logic  req_valid, skip, active;

  bit cached [line_t];
  assign probe_hit = cached.exists(probe_line);

  cgp_pf_gen #(.N_LINES(N)) dut (.clk, .rst_n, .start_valid, .start_addr, .probe_line, .probe_hit,
    .req_valid, .req_line, .req_ready, .skip, .active);

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  line_t got [$];
  int unsigned n_skip = 0;
  always @(posedge clk) begin
    if (req_valid && req_ready) got.push_back(req_line);
    if (skip) n_skip++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t exp [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // timing: start in cycle t, request visible in cycle t+1
    req_ready = 1;
    start_valid = 1; start_addr = 32'h0001_0044;
    @(negedge clk); start_valid = 0;
    check(req_valid && req_line == line_of(32'h0001_0044), "first line one cycle after start");
    repeat (N + 2) @(negedge clk);
    check(got.size() == N, "burst length");
    got.delete();
    for (int n = 0; n < 300; n++) begin
      automatic addr_t a = $urandom & 32'h00FF_FFFF;
      exp.delete();
      cached.delete();
      for (int k = 0; k < N; k++) begin
        automatic line_t l = line_of(a) + line_t'(k);
        if ($urandom_range(3) == 0) cached[l] = 1;
        else exp.push_back(l);
      end
      @(negedge clk);
      start_valid = 1; start_addr = a;
      @(negedge clk);
      start_valid = 0;
      while (active) begin
        req_ready = ($urandom_range(2) != 0);
        @(negedge clk);
      end
      check(got.size() == exp.size(), $sformatf("burst %0d: %0d lines, expected %0d", n, got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size()) check(got[i] == exp[i], $sformatf("burst %0d line %0d", n, i));
      got.delete();
    end
    check(n_skip > 100, "cached lines were skipped");
    // a new start replaces the rest of a burst
    cached.delete();
    req_ready = 1;
    start_valid = 1; start_addr = 32'h0000_1000;
    @(negedge clk);
    start_valid = 1; start_addr = 32'h0000_8000;
    @(negedge clk);
    start_valid = 0;
    repeat (N + 3) @(negedge clk);
    check(got.size() == N + 1 && got[0] == line_of(32'h1000) && got[1] == line_of(32'h8000)
          && got[N] == line_of(32'h8000) + line_t'(N - 1), "restart replaces the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
