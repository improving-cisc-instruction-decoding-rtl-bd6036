// branch_pred_cache: chooses which path of a tree-like line is issued.
//
// A direct-mapped, tagged table of one taken/untaken bit per branch,
// indexed by the low address bits of the branch instruction. Lookup is
// combinational: with a tag match, pred is the stored bit; without one, a
// default heuristic decides: a backward branch (target not above the branch)
// is predicted taken, a forward one untaken. pred_hit tells which case
// applied. An update (upd_valid) writes the resolved direction at the clock
// edge, installing the branch if it was absent.
//
// The document asks for a taken/untaken predictor held in a branch prediction
// cache with a fallback heuristic. The table size, its organisation and the
// backward-taken heuristic are this design's own choices.
module branch_pred_cache
  import fu_pkg::*;
#(
  parameter int unsigned ENTRIES = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t lk_addr,
  input  addr_t lk_target,
  output logic  pred,
  output logic  pred_hit,
  input  logic  upd_valid,
  input  addr_t upd_addr,
  input  logic  upd_taken
);
  localparam int unsigned IB = $clog2(ENTRIES);
  localparam int unsigned TB = ADDR_W - IB;

  logic          valid [ENTRIES];
  logic [TB-1:0] tag   [ENTRIES];
  logic          bit_t [ENTRIES];

  logic [IB-1:0] li, ui;
  assign li = lk_addr[IB-1:0];
  assign ui = upd_addr[IB-1:0];

  assign pred_hit = valid[li] && tag[li] == lk_addr[ADDR_W-1:IB];
  assign pred     = pred_hit ? bit_t[li] : (lk_target <= lk_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) valid[e] <= 1'b0;
    end else if (upd_valid) begin
      valid[ui] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) begin
      tag[ui]   <= upd_addr[ADDR_W-1:IB];
      bit_t[ui] <= upd_taken;
    end
  end
endmodule
