// tb_nl_prefetcher: checks next-N-line prefetching: a fetch to a new line
// L requests L+1..L+N (minus cached lines) starting the next cycle, a
// fetch to the same line again triggers nothing, and a new line abandons
// the rest of the previous burst.
module tb_nl_prefetcher;
  import cgp_pkg::*;

  localparam int unsigned N = 4;

  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  fetch_valid = 0, req_ready = 1, probe_hit;
  addr_t fetch_addr = '0;
  line_t probe_line, req_line;
  logic  req_valid, skip, trigger;

  bit cached [line_t];
  assign probe_hit = cached.exists(probe_line);

  nl_prefetcher #(.N_LINES(N)) dut (.clk, .rst_n, .fetch_valid, .fetch_addr, .probe_line, .probe_hit,
    .req_valid, .req_line, .req_ready, .skip, .trigger);

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  line_t got [$];
  always @(posedge clk) if (req_valid && req_ready) got.push_back(req_line);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(addr_t a);
    @(negedge clk);
    fetch_valid = 1; fetch_addr = a;
    @(negedge clk);
    fetch_valid = 0;
  endtask

  initial begin
    line_t exp [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // timing and the next four lines
    fetch(32'h0000_2004);
    check(req_valid && req_line == line_of(32'h2004) + 1, "L+1 requested the cycle after the fetch");
    repeat (N + 2) @(negedge clk);
    check(got.size() == N && got[N-1] == line_of(32'h2004) + line_t'(N), "next N lines");
    got.delete();
    // same line again: no new burst
    fetch(32'h0000_2010);
    repeat (N + 2) @(negedge clk);
    check(got.size() == 0, "same line does not retrigger");
    for (int n = 0; n < 300; n++) begin
      automatic addr_t a = ($urandom & 32'h000F_FFE0) | 32'h0010_0000;
      exp.delete();
      cached.delete();
      for (int k = 1; k <= N; k++) begin
        automatic line_t l = line_of(a) + line_t'(k);
        if ($urandom_range(3) == 0) cached[l] = 1;
        else exp.push_back(l);
      end
      fetch(a);
      repeat (N + 2) begin
        req_ready = ($urandom_range(3) != 0);
        @(negedge clk);
      end
      req_ready = 1;
      repeat (N + 2) @(negedge clk);
      check(got.size() == exp.size(), $sformatf("burst %0d size %0d expected %0d", n, got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size()) check(got[i] == exp[i], $sformatf("burst %0d line %0d", n, i));
      got.delete();
    end
    // a new line abandons the previous burst
    cached.delete();
    fetch(32'h0003_0000);
    fetch(32'h0005_0000);
    repeat (N + 3) @(negedge clk);
    check(got.size() > N && got.size() < 2 * N && got[got.size() - N] == line_of(32'h5_0000) + 1
          && got[got.size() - N - 1] == got[0] + line_t'(got.size() - N - 1), "new line replaces the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
