// tb_cghc_ctrl: self-checking test of the CGHC engine.
//
// Part 1 replays the record-creation call graph twice (Create_rec calls
// Find_page, which the first time calls Getpage_from_disk, then Lock_page,
// Update_page, Unlock_page) and checks the exact prefetch sequence of the
// second pass against a hand-written list. Part 2 drives random calls and
// returns over a small function pool and compares every prefetch, and its
// latency (1 cycle after the access on a first-level hit, 1 + L2_LAT on a
// second-level hit), with a reference model of the two-level CGHC kept in
// this file. Small CGHC levels force conflict misses and entry moves.
// Part 1b checks that a function with ten callees keeps the first eight.
// Part 3 overruns the event FIFO and checks the number of dropped events.
module tb_cghc_ctrl;
  import cgp_pkg::*;

  localparam int unsigned L1E = 4, L2E = 16, LAT = 3, EVQ = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ev_valid = 0;
  cgp_event_t ev = '0;
  logic       ev_drop, pf_valid, st_l1_hit, st_l2_hit, st_alloc, busy;
  addr_t      pf_addr;

  cghc_ctrl #(.L1_ENTRIES(L1E), .L2_ENTRIES(L2E), .L2_LAT(LAT), .EVQ_DEPTH(EVQ)) dut (
    .clk, .rst_n, .ev_valid, .ev, .ev_drop, .pf_valid, .pf_addr,
    .st_l1_hit, .st_l2_hit, .st_alloc, .busy);

  int unsigned checks = 0, failures = 0, cyc = 0;
  int unsigned n_l1 = 0, n_l2 = 0, n_alloc = 0, n_drop = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    n_l1 <= n_l1 + st_l1_hit; n_l2 <= n_l2 + st_l2_hit;
    n_alloc <= n_alloc + st_alloc; n_drop <= n_drop + ev_drop;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ------------------------------------------------------ reference model
  typedef struct {
    bit          v;
    int unsigned func;
    int unsigned idx;
    bit          full;
    bit          sv [8];
    int unsigned sl [8];
  } ment_t;

  ment_t m1 [L1E];
  ment_t m2 [L2E];

  function automatic ment_t fresh(int unsigned f);
    ment_t e;
    e.v = 1; e.func = f; e.idx = 1; e.full = 0;
    for (int k = 0; k < 8; k++) begin e.sv[k] = 0; e.sl[k] = 0; end
    return e;
  endfunction

  // one access: returns the entry now in the first level and the level hit
  function automatic ment_t maccess(int unsigned key, output int level);
    int unsigned s1 = (key >> 2) % L1E, s2 = (key >> 2) % L2E;
    ment_t ne, vic;
    if (m1[s1].v && m1[s1].func == key) begin
      level = 1;
      return m1[s1];
    end
    if (m2[s2].v && m2[s2].func == key) begin level = 2; ne = m2[s2]; end
    else begin level = 0; ne = fresh(key); end
    vic = m1[s1];
    if (vic.v) m2[(vic.func >> 2) % L2E] = vic;
    m1[s1] = ne;
    return ne;
  endfunction

  // apply event; returns expected prefetch (valid, address, latency)
  function automatic bit model_event(bit is_ret, int unsigned pf_key, int unsigned upd_key,
                                     output int unsigned exp_a, output int unsigned exp_lat);
    int    lvl;
    ment_t e;
    bit    pf = 0;
    int unsigned s;
    exp_a = 0; exp_lat = 0;
    e = maccess(pf_key, lvl);
    if (lvl != 0) begin
      s = is_ret ? e.idx - 1 : 0;
      pf = e.sv[s] && !(is_ret && e.full);
      exp_a = e.sl[s];
      exp_lat = (lvl == 1) ? 1 : 1 + LAT;
    end
    e = maccess(upd_key, lvl);
    if (is_ret) begin e.idx = 1; e.full = 0; end
    else if (!e.full) begin
      e.sl[e.idx-1] = pf_key; e.sv[e.idx-1] = 1;
      if (e.idx == 8) e.full = 1; else e.idx++;
    end
    m1[(upd_key >> 2) % L1E] = e;
    return pf;
  endfunction

  // ----------------------------------------------------------- driving
  // send one event, wait until the engine is idle; report prefetches seen
  int unsigned seen_n, seen_a, seen_lat;
  task automatic send(bit is_ret, addr_t pf_key, addr_t upd_key);
    int unsigned t0;
    @(negedge clk);
    ev_valid = 1;
    ev = '{kind: is_ret ? EV_RET : EV_CALL, pf_vld: 1'b1, pf_key: pf_key,
           upd_vld: 1'b1, upd_key: upd_key};
    t0 = cyc;
    seen_n = 0;
    @(negedge clk);
    ev_valid = 0;
    while (busy || pf_valid) begin
      if (pf_valid) begin seen_n++; seen_a = pf_addr; seen_lat = cyc - t0; end
      @(negedge clk);
    end
  endtask

  // function addresses: distinct sets in both levels for k < 16
  function automatic addr_t fa(int k);
    return 32'h0000_2000 + 32'h104 * k;
  endfunction

  localparam int OP = 0, CR = 1, FP = 2, GP = 3, LP = 4, UP = 5, UL = 6;

  // P calls F / F returns to P
  task automatic do_call(int p, int f); send(0, fa(f), fa(p)); endtask
  task automatic do_ret(int f, int p);  send(1, fa(p), fa(f)); endtask

  addr_t got [$];
  task automatic rec_call(int p, int f); do_call(p, f); if (seen_n) got.push_back(seen_a); endtask
  task automatic rec_ret(int f, int p);  do_ret(f, p);  if (seen_n) got.push_back(seen_a); endtask

  task automatic walk(bit from_disk);
    rec_call(OP, CR);
    rec_call(CR, FP);
    if (from_disk) begin rec_call(FP, GP); rec_ret(GP, FP); end
    rec_ret(FP, CR);
    rec_call(CR, LP); rec_ret(LP, CR);
    rec_call(CR, UP); rec_ret(UP, CR);
    rec_call(CR, UL); rec_ret(UL, CR);
    rec_ret(CR, OP);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t exp_seq [$];
    int unsigned ea, el;
    bit ep;
    int stack [$];
    int cur;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- part 1: the record-creation example
    walk(1);
    check(got.size() == 0, "no prefetch on a cold CGHC");
    got.delete();
    walk(0);
    exp_seq = '{fa(FP), fa(GP), fa(LP), fa(UP), fa(UL)};
    check(got.size() == exp_seq.size(), $sformatf("example: %0d prefetches", got.size()));
    foreach (exp_seq[i])
      if (i < got.size()) check(got[i] == exp_seq[i], $sformatf("example prefetch %0d", i));

    // ---- part 1b: a function with ten callees keeps only the first eight
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      got.delete();
      rec_call(19, 20);
      for (int k = 21; k <= 30; k++) begin rec_call(20, k); rec_ret(k, 20); end
      rec_ret(20, 19);
    end
    check(got.size() == 8, $sformatf("saturation: %0d prefetches, expected 8", got.size()));
    for (int k = 0; k < 8; k++)
      if (k < got.size()) check(got[k] == fa(21 + k), $sformatf("saturation prefetch %0d", k));

    // ---- part 2: random calls and returns against the model
    // restart the model from the state left by part 1
    for (int i = 0; i < L1E; i++) m1[i].v = 0;
    for (int i = 0; i < L2E; i++) m2[i].v = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    cur = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic bit do_r = (stack.size() > 0) && ($urandom_range(99) < 45 || stack.size() > 10);
      if (do_r) begin
        automatic int p = stack.pop_back();
        ep = model_event(1, fa(p), fa(cur), ea, el);
        do_ret(cur, p);
        cur = p;
      end else begin
        // each function mostly calls from its own short list
        automatic int f = (cur * 7 + stack.size() * 5 + ($urandom_range(99) < 70 ? 1 : $urandom_range(30))) % 31;
        ep = model_event(0, fa(f), fa(cur), ea, el);
        do_call(cur, f);
        stack.push_back(cur);
        cur = f;
      end
      check(seen_n == (ep ? 1 : 0), $sformatf("event %0d: prefetch count %0d, expected %0d", n, seen_n, ep));
      if (ep && seen_n == 1) begin
        check(seen_a == ea, $sformatf("event %0d: prefetch %h, expected %h", n, seen_a, ea));
        check(seen_lat == el, $sformatf("event %0d: latency %0d, expected %0d", n, seen_lat, el));
      end
    end
    check(n_l1 > 100 && n_l2 > 20 && n_alloc > 20,
          $sformatf("hit mix l1=%0d l2=%0d alloc=%0d", n_l1, n_l2, n_alloc));

    // ---- part 3: backlog; first event is taken at once, EVQ queue, rest drop
    @(negedge clk);
    for (int i = 0; i < EVQ + 3; i++) begin
      ev_valid = 1;
      ev = '{kind: EV_CALL, pf_vld: 1'b1, pf_key: fa(40 + i), upd_vld: 1'b1, upd_key: fa(50 + i)};
      @(negedge clk);
    end
    ev_valid = 0;
    while (busy) @(negedge clk);
    check(n_drop == 2, $sformatf("dropped %0d events, expected 2", n_drop));

    $display("cghc_ctrl: l1 hits %0d, l2 hits %0d, allocations %0d", n_l1, n_l2, n_alloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
