// decoded_icache: set-associative store of tree-like decoded lines.
//
// ENTRIES lines in WAYS ways. A line is found by the full address of its
// first instruction (its entry tag); the set index is taken from the address
// bits just above the low four, so all lines that start in one 16-byte block
// share a set. Lookup is combinational: hit, hit_way and hit_line answer
// lk_addr in the same cycle. A write (wr_valid) lands at the clock edge: it
// replaces a line with the same entry tag if one exists, else fills an empty
// way, else the way a per-set round-robin pointer names.
//
// Self-modifying code: inv_valid with the address of a written byte starts a
// four-cycle sweep (inv_busy high; a new request during the sweep is ignored).
// Each cycle one 16-byte block is checked, in the order X-48, X-32, X-16, X
// (block addresses, low four bits dropped). A line dies if its entry tag or its
// target tag (second tag, address of instructions from the branch target) lies
// in that block. The entry check looks at the block's set; the target check
// looks at all lines. inv_kill counts the lines removed in the cycle.
//
// The 1K entries, 4 ways, the two tags and the four increment-by-16
// invalidates are the document's. Indexing, round-robin replacement and the
// sweep timing are this design's own.
module decoded_icache
  import fu_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // lookup
  input  addr_t  lk_addr,
  output logic   hit,
  output logic [$clog2(WAYS)-1:0] hit_way,
  output dline_t hit_line,
  // fill
  input  logic   wr_valid,
  input  addr_t  wr_entry,
  input  dline_t wr_line,
  // range invalidation
  input  logic   inv_valid,
  input  addr_t  inv_addr,
  output logic   inv_busy,
  output logic [$clog2(ENTRIES+1)-1:0] inv_kill
);
  localparam int unsigned SETS = ENTRIES / WAYS;
  localparam int unsigned IB   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WB   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic   valid [ENTRIES];
  addr_t  etag  [ENTRIES];
  logic   tval  [ENTRIES];
  addr_t  ttag  [ENTRIES];
  dline_t data  [ENTRIES];
  logic [WB-1:0] rr [SETS];

  function automatic int unsigned set_of(addr_t a);
    return (SETS > 1) ? int'(a[4 +: IB]) : 0;
  endfunction

  // ---- lookup
  always_comb begin
    int unsigned base;
    base    = set_of(lk_addr) * WAYS;
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (!hit && valid[base + w] && etag[base + w] == lk_addr) begin
        hit     = 1'b1;
        hit_way = $bits(hit_way)'(w);
      end
    hit_line = data[base + int'(hit_way)];
  end

  // ---- write way selection
  logic [WB-1:0] wway;
  logic          wmatch, wfree;
  always_comb begin
    int unsigned base;
    base   = set_of(wr_entry) * WAYS;
    wmatch = 1'b0;
    wfree  = 1'b0;
    wway   = rr[set_of(wr_entry)];
    for (int w = 0; w < WAYS; w++)
      if (!wmatch && valid[base + w] && etag[base + w] == wr_entry) begin
        wmatch = 1'b1;
        wway   = WB'(w);
      end
    if (!wmatch)
      for (int w = WAYS - 1; w >= 0; w--)
        if (!valid[base + w]) begin
          wfree = 1'b1;
          wway  = WB'(w);
        end
  end

  // ---- invalidation sweep
  logic [1:0]  inv_step;
  logic [27:0] inv_blk0;
  logic [27:0] cur_blk;
  logic        kill [ENTRIES];
  assign cur_blk = inv_blk0 + 28'(inv_step);

  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int e = 0; e < ENTRIES; e++) begin
      kill[e] = inv_busy && valid[e] &&
                ((e / WAYS == set_of({cur_blk, 4'h0}) && etag[e][31:4] == cur_blk) ||
                 (tval[e] && ttag[e][31:4] == cur_blk));
      if (kill[e]) cnt++;
    end
    inv_kill = $bits(inv_kill)'(cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) valid[e] <= 1'b0;
      for (int s = 0; s < SETS; s++) rr[s] <= '0;
      inv_busy <= 1'b0;
      inv_step <= '0;
      inv_blk0 <= '0;
    end else begin
      if (wr_valid) begin
        valid[set_of(wr_entry) * WAYS + int'(wway)] <= 1'b1;
        if (!wmatch && !wfree)
          rr[set_of(wr_entry)] <= WB'((int'(rr[set_of(wr_entry)]) + 1) % WAYS);
      end
      for (int e = 0; e < ENTRIES; e++)
        if (kill[e]) valid[e] <= 1'b0;
      if (inv_busy) begin
        inv_step <= inv_step + 2'd1;
        if (inv_step == 2'd3) inv_busy <= 1'b0;
      end else if (inv_valid) begin
        inv_busy <= 1'b1;
        inv_step <= '0;
        inv_blk0 <= inv_addr[31:4] - 28'd3;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      etag[set_of(wr_entry) * WAYS + int'(wway)] <= wr_entry;
      tval[set_of(wr_entry) * WAYS + int'(wway)] <= wr_line.tgt_valid;
      ttag[set_of(wr_entry) * WAYS + int'(wway)] <= wr_line.tgt_addr;
      data[set_of(wr_entry) * WAYS + int'(wway)] <= wr_line;
    end
  end
endmodule
