// tb_cgp_top: end-to-end test of the call graph prefetcher at its default
// sizes (2KB + 32KB CGHC, CGP_4 and NL_4, 32KB 2-way I-cache, 16-cycle L2).
//
// The testbench plays the processor core and branch predictor. It builds a
// layered synthetic program - a few query operators on top, storage-manager
// style functions below, leaf routines at the bottom, each with a fixed
// list of callees and a body of a few cache lines, spread over more code
// than the I-cache holds - and executes it: it fetches each function's
// lines through the I-cache, announces every call (predicted target and
// return address) and every return, and checks that
//   * every fetched line carries the right data (L2 model pattern),
//   * every return is predicted with the right return address,
//   * every CGHC prefetch names the start of a real function,
//   * a cold demand miss takes the L2 latency plus 4 cycles.
// A dispatcher function calls a row of empty stubs back to back so that
// the CGHC engine's event FIFO overflows. Each mechanism is counted and
// must occur at least once: I-cache hit and miss, CGHC first-level hit,
// second-level hit and allocation, CGHC prefetch, CGHC and NL line
// requests, prefetch squashed as already in flight, prefetch dropped as
// already cached, prefetch hit, delayed hit, useless prefetch, dropped
// event. At least a third of the calls must have been named by a CGHC
// prediction issued within 40 cycles of the call (about half are; cold
// history, randomly skipped calls and events dropped while the engine waits
// on the second CGHC level account for the rest). Finally the I-cache
// misses of the last queries are compared with those of the first ones.
module tb_cgp_top;
  import cgp_pkg::*;

  localparam int unsigned L2_LAT = 16;
  localparam int NF = 700;
  localparam int NQUERY = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       call_valid = 0, ret_valid = 0, fetch_valid = 0;
  addr_t      call_target = '0, call_ret_addr = '0, fetch_addr = '0;
  logic       ret_pred_valid, fetch_ready, resp_valid;
  addr_t      ret_pred_addr, resp_addr;
  line_data_t resp_data, l2_resp_data;
  logic       l2_req_valid, l2_req_ready, l2_resp_valid;
  line_t      l2_req_line;
  cgp_stat_t  stat;
  int unsigned n_l2;

  cgp_top dut (.clk, .rst_n, .call_valid, .call_target, .call_ret_addr, .ret_valid,
    .ret_pred_valid, .ret_pred_addr, .fetch_valid, .fetch_addr, .fetch_ready, .resp_valid,
    .resp_addr, .resp_data, .l2_req_valid, .l2_req_line, .l2_req_ready, .l2_resp_valid,
    .l2_resp_data, .stat);

  l2_model #(.LAT(L2_LAT)) u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_line(l2_req_line),
    .req_ready(l2_req_ready), .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .n_req(n_l2));

  int unsigned checks = 0, failures = 0, cyc = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ------------------------------------------------------ event counters
  localparam int NS = $bits(cgp_stat_t);
  int unsigned cnt [NS];
  string names [NS] = '{"ic_hit", "ic_miss", "pf_hit", "delayed_hit", "pf_useless", "cghc_pf",
                         "cghc_req", "nl_req", "pf_squash", "pf_cached", "cghc_l1_hit",
                         "cghc_l2_hit", "cghc_alloc", "ev_drop"};
  initial foreach (cnt[i]) cnt[i] = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NS; i++) cnt[i] += stat[NS-1-i];
  end

  // ----------------------------------------------------------- program
  addr_t fstart [NF];
  int    flen   [NF];          // body length in lines
  int    fcall  [NF][$];       // callees, in call order
  int    fat    [NF][$];       // line after which each call is made
  bit    is_func [addr_t];

  // every CGHC prefetch must name a function start
  // and record predictions and calls to measure how many calls were foreseen
  addr_t       pf_a [$], call_a [$];
  int unsigned pf_c [$], call_c [$];
  always @(posedge clk) begin
    if (rst_n && dut.pf_valid) begin
      check(is_func.exists(dut.pf_addr), "CGHC prefetch is a function start");
      pf_a.push_back(dut.pf_addr); pf_c.push_back(cyc);
    end
    if (call_valid) begin call_a.push_back(call_target); call_c.push_back(cyc); end
  end

  // calls whose target the CGHC named within WIN cycles around the call
  // (the engine may run a few events behind the core)
  function automatic int unsigned foreseen(int unsigned win);
    int unsigned n = 0, lo = 0;
    foreach (call_a[i]) begin
      while (lo < pf_c.size() && pf_c[lo] + win < call_c[i]) lo++;
      for (int k = lo; k < pf_c.size() && pf_c[k] <= call_c[i] + win; k++)
        if (pf_a[k] == call_a[i]) begin n++; break; end
    end
    return n;
  endfunction

  function automatic void build();
    int lo [6] = '{0, 6, 40, 160, 420, 690};   // layer boundaries; 690.. stubs
    addr_t a = 32'h0010_0000;
    for (int f = 0; f < NF; f++) begin
      int layer = 0;
      for (int k = 0; k < 5; k++) if (f >= lo[k]) layer = k;
      if (f >= lo[5]) layer = 5;
      flen[f] = (layer == 5) ? 0 : $urandom_range(2, 7);
      fstart[f] = a + 4 * $urandom_range(0, 3);
      is_func[fstart[f]] = 1;
      a += 32 * (flen[f] + 1) + 32 * $urandom_range(0, 3);
      if (layer < 4) begin
        int nc = $urandom_range(2, (layer == 0) ? 6 : 4);
        for (int c = 0; c < nc; c++) begin
          fcall[f].push_back($urandom_range(lo[layer + 1], lo[layer + 2] - 1));
          fat[f].push_back($urandom_range(0, flen[f] - 1));
        end
        fat[f].sort();
      end
    end
    // dispatcher: function 6 calls all stubs back to back from its first line
    fcall[6].delete(); fat[6].delete();
    for (int s = lo[5]; s < NF; s++) begin fcall[6].push_back(s); fat[6].push_back(0); end
  endfunction

  // ----------------------------------------------------- core behaviour
  int unsigned first_lat = 0;      // latency of the very first (cold) fetch

  task automatic fetch(addr_t a);
    int unsigned lat = 0;
    check(fetch_ready, "I-cache ready for the next fetch");
    fetch_valid = 1; fetch_addr = a;
    @(negedge clk);
    fetch_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    check(resp_addr == a && resp_data == tb_pkg::line_pattern(line_of(a)), "fetched line data");
    if (first_lat == 0) first_lat = lat;
    // a 4-wide core needs two cycles for the eight instructions of a line
    @(negedge clk);
  endtask

  // runs one query: the call tree below function f, with an explicit stack
  typedef struct { int f; int j; int ci; bit fetched; addr_t ra; } frame_t;

  task automatic exec(int f);
    frame_t st [$];
    st.push_back('{f: f, j: 0, ci: 0, fetched: 0, ra: '0});
    while (st.size() > 0) begin
      frame_t fr = st[$];
      int nl = (flen[fr.f] > 0) ? flen[fr.f] : 1;
      if (fr.j >= nl) begin
        void'(st.pop_back());
        if (st.size() > 0) begin
          ret_valid = 1; #1;
          check(ret_pred_valid && ret_pred_addr == fr.ra, "return address predicted");
          @(negedge clk);
          ret_valid = 0;
        end
      end else if (!fr.fetched) begin
        st[$].fetched = 1;
        if (flen[fr.f] > 0) begin
          fetch(fstart[fr.f] + 32 * fr.j);
          if ($urandom_range(1) == 1) fetch((fstart[fr.f] + 32 * fr.j) | 32'h18);
        end
      end else if (fr.ci < fcall[fr.f].size() && fat[fr.f][fr.ci] == fr.j) begin
        int c = fcall[fr.f][fr.ci];
        addr_t ra = fstart[fr.f] + 32 * fr.j + 16;
        st[$].ci = fr.ci + 1;
        if ($urandom_range(99) >= 8) begin        // 8% of calls not taken this time
          call_valid = 1; call_target = fstart[c]; call_ret_addr = ra;
          @(negedge clk);
          call_valid = 0;
          st.push_back('{f: c, j: 0, ci: 0, fetched: 0, ra: ra});
        end
      end else begin
        st[$].j = fr.j + 1;
        st[$].fetched = 0;
      end
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int unsigned miss_first = 0, miss_last = 0;
    int unsigned m0;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int q = 0; q < NQUERY; q++) begin
      m0 = cnt[1];
      exec(q % 6);
      if (q < 6) miss_first += cnt[1] - m0;
      if (q >= NQUERY - 6) miss_last += cnt[1] - m0;
    end
    repeat (100) @(negedge clk);
    // cold miss: miss found (1), queued (1), L2 (L2_LAT), line written (1), answered (1)
    check(first_lat == L2_LAT + 4, $sformatf("cold miss took %0d cycles", first_lat));
    for (int i = 0; i < NS; i++) begin
      $display("  %-12s %0d", names[i], cnt[i]);
      check(cnt[i] > 0, $sformatf("mechanism %s occurred", names[i]));
    end
    $display("  I-cache misses: first six queries %0d, last six %0d; %0d cycles",
             miss_first, miss_last, cyc);
    check(miss_last < miss_first, "warm call graph history reduces misses");
    begin
      automatic int unsigned n_pred = foreseen(40);
      $display("  calls %0d, named by a CGHC prediction within 40 cycles %0d", call_a.size(), n_pred);
      check(n_pred * 3 > call_a.size(), "a third of the calls were predicted by the CGHC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
