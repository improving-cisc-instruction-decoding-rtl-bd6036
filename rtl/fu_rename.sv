// fu_rename: renaming of a decoded line's microarchitected registers.
//
// Every line read from the decoded instruction cache carries up to nine line
// registers (numbers 0..8 in the low four bits of an MR register number). This
// block gives them names in the separate fill unit register file by
// prefixing the number with the current value of a LINE_CTR_W-bit line access
// counter: name = {counter, number}. Architected registers pass through for
// the general renamer. The mapping is combinational; the counter advances at
// the clock edge after every line taken (take high), so consecutive lines use
// disjoint names until the counter wraps. fu_reads / fu_writes count the fill
// unit register references among the first n_uops microoperations.
//
// Bit insertion from a line access counter, 5 + 4 bits and the resulting
// 512-entry register file are the document's. The counter advancing once per
// line taken is this design's reading of "access counter".
module fu_rename
  import fu_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   take,
  input  logic [4:0]             n_uops,
  input  uop_t [LINE_UOPS-1:0]   in_uops,
  output xuop_t [LINE_UOPS-1:0]  out_uops,
  output logic [LINE_CTR_W-1:0]  ctr,
  output logic [5:0]             fu_reads,
  output logic [5:0]             fu_writes
);
  function automatic xreg_t ren(reg_t r, logic [LINE_CTR_W-1:0] c);
    if (is_mr(r)) return '{fu: 1'b1, idx: {c, r[3:0]}};
    return to_x(r);
  endfunction

  always_comb begin
    fu_reads  = '0;
    fu_writes = '0;
    for (int k = 0; k < LINE_UOPS; k++) begin
      uop_t u;
      u = in_uops[k];
      out_uops[k].kind   = u.kind;
      out_uops[k].func   = u.func;
      out_uops[k].dst    = ren(u.dst, ctr);
      out_uops[k].dst2   = ren(u.dst2, ctr);
      out_uops[k].wflags = u.wflags;
      out_uops[k].srca   = ren(u.srca, ctr);
      out_uops[k].srcb   = ren(u.srcb, ctr);
      out_uops[k].srcc   = ren(u.srcc, ctr);
      out_uops[k].rflags = u.rflags;
      if (k < int'(n_uops)) begin
        fu_writes = fu_writes + 6'(is_mr(u.dst)) + 6'(is_mr(u.dst2));
        fu_reads  = fu_reads + 6'(is_mr(u.srca)) + 6'(is_mr(u.srcb)) + 6'(is_mr(u.srcc));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctr <= '0;
    else if (take) ctr <= ctr + 1'b1;
  end
endmodule
