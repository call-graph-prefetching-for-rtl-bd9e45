// cghc_store: one level of the Call Graph History Cache (CGHC).
//
// A direct-mapped array of cghc_entry_t. Each entry pairs a tag-array part
// (function start address F and the index of the next call slot) with a
// data-array part (start addresses of up to eight functions that F called
// on its most recent invocation). The set is chosen by the low-order bits
// of the function start address above its 4-byte instruction alignment;
// the full start address is kept as the tag, as the CGHC is described.
//
// Interface and timing: a combinational read port (rd_key -> rd_entry,
// rd_hit) and a synchronous write port (wr_en, wr_entry, written into the
// set of wr_entry.func at the clock edge). The controller uses at most one
// access per cycle, so the array behaves as single-ported. Only the valid
// bits are reset. ENTRIES defaults to 64, i.e. 2KB of 32-byte data-array
// lines for the first level; the second level uses 1024 (32KB). Taking the
// KB figure as the data-array size, and using direct mapping for the second
// level too, are choices of this design.
module cghc_store
  import cgp_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // read port
  input  addr_t       rd_key,
  output cghc_entry_t rd_entry,
  output logic        rd_hit,
  // write port
  input  logic        wr_en,
  input  cghc_entry_t wr_entry
);

  localparam int unsigned SET_W = $clog2(ENTRIES);

  typedef logic [SET_W-1:0] set_t;

  function automatic set_t set_of(addr_t a);
    return a[2 +: SET_W];
  endfunction

  logic [ENTRIES-1:0] valid_q;
  cghc_entry_t        mem [ENTRIES];

  set_t rd_set, wr_set;
  assign rd_set = set_of(rd_key);
  assign wr_set = set_of(wr_entry.func);

  always_comb begin
    rd_entry       = mem[rd_set];
    rd_entry.valid = valid_q[rd_set];
    rd_hit         = valid_q[rd_set] && (mem[rd_set].func == rd_key);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_set] <= wr_entry.valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_set] <= wr_entry;
  end

endmodule
