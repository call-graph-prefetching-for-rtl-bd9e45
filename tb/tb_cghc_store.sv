// tb_cghc_store: checks one CGHC level: reads after writes, tag compare on
// the full start address, direct-mapped replacement, invalidation and the
// reset of the valid bits. Expected contents come from a shadow array.
module tb_cghc_store;
  import cgp_pkg::*;

  localparam int unsigned ENT = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t       rd_key = '0;
  cghc_entry_t rd_entry, wr_entry = '0;
  logic        rd_hit, wr_en = 0;

  cghc_store #(.ENTRIES(ENT)) dut (.clk, .rst_n, .rd_key, .rd_entry, .rd_hit, .wr_en, .wr_entry);

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  cghc_entry_t shadow [ENT];
  bit          sh_v   [ENT];

  function automatic cghc_entry_t rnd_entry(addr_t f);
    cghc_entry_t e;
    e.valid = 1'b1;
    e.func  = f;
    e.index = index_t'($urandom_range(1, 8));
    e.full  = 1'($urandom);
    e.slot_valid = 8'($urandom);
    for (int k = 0; k < SLOTS; k++) e.slot[k] = $urandom;
    return e;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < ENT; i++) sh_v[i] = 0;
    // nothing valid after reset
    for (int i = 0; i < ENT; i++) begin
      rd_key = addr_t'(i * 4); #1;
      check(!rd_hit && !rd_entry.valid, "empty after reset");
    end
    for (int n = 0; n < 2000; n++) begin
      automatic addr_t f = {$urandom_range(15), 8'($urandom_range(255)), 2'b00} | 32'h0040_0000;
      automatic int unsigned s = (f >> 2) % ENT;
      @(negedge clk);
      if ($urandom_range(3) != 0) begin
        wr_en = 1;
        wr_entry = rnd_entry(f);
        if ($urandom_range(9) == 0) wr_entry.valid = 1'b0;
        shadow[s] = wr_entry;
        sh_v[s] = wr_entry.valid;
        @(negedge clk);
        wr_en = 0;
      end
      // read the same function and a random neighbour
      rd_key = f; #1;
      check(rd_hit == (sh_v[s] && shadow[s].func == f), $sformatf("hit for %h", f));
      if (sh_v[s]) check(rd_entry == shadow[s], $sformatf("entry contents for %h", f));
      rd_key = f ^ 32'h0001_0000; #1;
      check(rd_hit == (sh_v[s] && shadow[s].func == rd_key), "tag compares all address bits");
    end
    // reset clears everything
    rst_n = 0; #1; rst_n = 1;
    rd_key = shadow[0].func; #1;
    check(!rd_hit, "reset clears valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
