// uop_mux: selects the microoperations sent on to general renaming.
//
// Combinational. When sel_dic (the decoded cache hit signal) is high, the
// fill-unit-renamed line path passes through unchanged with its count. When it
// is low, the groups of the n_dec instructions just decoded are packed back to
// back: group 0 first, then group 1 starting right after its last
// microoperation, and so on, and their registers are tagged as still to be
// renamed. Slots beyond out_n are U_NONE.
//
// The selection by the hit signal is the document's; packing the decoder
// groups into one list is this design's own interface choice.
module uop_mux
  import fu_pkg::*;
(
  input  logic                  sel_dic,
  input  logic [4:0]            dic_n,
  input  xuop_t [LINE_UOPS-1:0] dic_uops,
  input  logic [1:0]            n_dec,
  input  dgroup_t [2:0]         dec_grp,
  output logic [4:0]            out_n,
  output xuop_t [LINE_UOPS-1:0] out_uops
);
  always_comb begin
    int unsigned pos;
    for (int k = 0; k < LINE_UOPS; k++) out_uops[k] = to_xuop(UOP_NONE);
    pos = 0;
    if (sel_dic) begin
      out_n = dic_n;
      for (int k = 0; k < LINE_UOPS; k++)
        if (k < int'(dic_n)) out_uops[k] = dic_uops[k];
    end else begin
      for (int g = 0; g < 3; g++)
        if (g < int'(n_dec))
          for (int j = 0; j < TPL_UOPS; j++)
            if (j < int'(dec_grp[g].n_uops)) begin
              out_uops[pos] = to_xuop(dec_grp[g].uops[j]);
              pos++;
            end
      out_n = 5'(pos);
    end
  end
endmodule
