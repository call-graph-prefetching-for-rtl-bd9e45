// tb_icache: checks the L1 I-cache against a 2-way LRU reference model in
// this file, on a small configuration so that lines are replaced often:
// hit/miss of every fetch, 1-cycle hit latency, the miss request and the
// answer the cycle after the fill, line data, probe ports, prefetch fills,
// and the prefetch outcome events (prefetch hit, delayed hit, useless).
module tb_icache;
  import cgp_pkg::*;

  localparam int unsigned BYTES = 1024;
  localparam int unsigned SETS  = BYTES / 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fetch_valid = 0, fetch_ready, resp_valid;
  addr_t      fetch_addr = '0, resp_addr;
  line_data_t resp_data, fill_data = '0;
  logic       miss_valid, miss_ready = 0, miss_dup = 0, fill_valid = 0;
  line_t      miss_line, fill_line = '0, probe_a_line = '0, probe_b_line = '0;
  req_src_e   miss_dup_src = SRC_DEMAND, fill_src = SRC_DEMAND;
  logic       probe_a_hit, probe_b_hit;
  logic       st_hit, st_miss, st_pf_hit, st_delayed_hit, st_pf_useless;

  icache #(.CACHE_BYTES(BYTES)) dut (.clk, .rst_n, .fetch_valid, .fetch_addr, .fetch_ready,
    .resp_valid, .resp_addr, .resp_data, .miss_valid, .miss_line, .miss_ready, .miss_dup,
    .miss_dup_src, .fill_valid, .fill_line, .fill_src, .fill_data, .probe_a_line, .probe_a_hit,
    .probe_b_line, .probe_b_hit, .st_hit, .st_miss, .st_pf_hit, .st_delayed_hit, .st_pf_useless);

  int unsigned checks = 0, failures = 0;
  int unsigned c_hit = 0, c_miss = 0, c_pfh = 0, c_dly = 0, c_usl = 0;
  int unsigned e_hit = 0, e_miss = 0, e_pfh = 0, e_dly = 0, e_usl = 0;
  always @(posedge clk) begin
    c_hit += st_hit; c_miss += st_miss; c_pfh += st_pf_hit;
    c_dly += st_delayed_hit; c_usl += st_pf_useless;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model
  line_t mt  [SETS][2];
  bit    mv  [SETS][2];
  bit    mp  [SETS][2];
  bit    lru [SETS];

  function automatic int mlook(line_t l);
    int s = l % SETS;
    for (int w = 0; w < 2; w++) if (mv[s][w] && mt[s][w] == l) return w;
    return -1;
  endfunction
  function automatic void mfill(line_t l, bit pf);
    int s = l % SETS, w;
    if (mlook(l) >= 0) return;
    w = !mv[s][0] ? 0 : (!mv[s][1] ? 1 : lru[s]);
    if (mv[s][w] && mp[s][w]) e_usl++;
    mt[s][w] = l; mv[s][w] = 1; mp[s][w] = pf; lru[s] = !w;
  endfunction
  function automatic void mtouch(line_t l, bit count_pf);
    int s = l % SETS, w = mlook(l);
    if (count_pf && mp[s][w]) e_pfh++;
    mp[s][w] = 0; lru[s] = !w;
  endfunction

  task automatic do_fill(line_t l, req_src_e src);
    @(negedge clk);
    fill_valid = 1; fill_line = l; fill_src = src; fill_data = tb_pkg::line_pattern(l);
    mfill(l, src != SRC_DEMAND);
    @(negedge clk);
    fill_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin mv[s][0] = 0; mv[s][1] = 0; lru[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      automatic line_t l = line_t'($urandom_range(3 * SETS)) + 32'h100;
      automatic int    op = $urandom_range(9);
      @(negedge clk);
      // probes
      probe_a_line = l; probe_b_line = l + 1; #1;
      check(probe_a_hit == (mlook(l) >= 0) && probe_b_hit == (mlook(l + 1) >= 0), "probe");
      if (op < 3) begin
        do_fill(l, $urandom_range(1) ? SRC_CGHC : SRC_NL);
      end else begin
        automatic addr_t a = {l, 5'($urandom_range(31))};
        automatic bit hit = (mlook(l) >= 0);
        check(fetch_ready, "ready when idle");
        fetch_valid = 1; fetch_addr = a;
        @(negedge clk);
        fetch_valid = 0;
        if (hit) begin
          e_hit++;
          mtouch(l, 1);
          check(resp_valid && resp_addr == a && resp_data == tb_pkg::line_pattern(l), "hit answered next cycle");
        end else begin
          automatic bit dly = ($urandom_range(3) == 0);
          automatic int unsigned wait_c = $urandom_range(8);
          e_miss++;
          check(!resp_valid && !fetch_ready, "miss stalls");
          check(miss_valid && miss_line == l, "miss request");
          miss_ready = 1; miss_dup = dly; miss_dup_src = dly ? SRC_CGHC : SRC_DEMAND;
          if (dly) e_dly++;
          @(negedge clk);
          miss_ready = 0; miss_dup = 0;
          check(!miss_valid, "miss request withdrawn once accepted");
          repeat (wait_c) begin
            @(negedge clk);
            check(!resp_valid, "no answer before the fill");
          end
          do_fill(l, dly ? SRC_CGHC : SRC_DEMAND);
          mtouch(l, 0);
          check(!resp_valid, "answer is one cycle after the line is present");
          @(negedge clk);
          check(resp_valid && resp_addr == a && resp_data == tb_pkg::line_pattern(l), "miss answered after fill");
        end
      end
    end
    @(negedge clk);
    check(c_hit == e_hit && c_miss == e_miss, $sformatf("hits %0d/%0d misses %0d/%0d", c_hit, e_hit, c_miss, e_miss));
    check(c_pfh == e_pfh && c_dly == e_dly && c_usl == e_usl,
          $sformatf("pf hits %0d/%0d delayed %0d/%0d useless %0d/%0d", c_pfh, e_pfh, c_dly, e_dly, c_usl, e_usl));
    check(e_pfh > 50 && e_dly > 50 && e_usl > 50, "all prefetch outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
