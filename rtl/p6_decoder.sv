// p6_decoder: the three-wide decoder of Figure-1 style (one complex, two simple).
//
// Combinational. Slot 1 (the queue head) goes to the complex decoder, which
// takes any instruction. Slot 2 is decoded in the same cycle only if slot 1
// was, and slot 2 holds a simple instruction; slot 3 likewise depends on slot
// 2. A complex instruction in slot 2 or 3 therefore waits for a later cycle,
// when it has reached slot 1. Decoding in a cycle also ends after a taken
// branch (conditional with taken set, unconditional, or indirect), since the
// following instructions come from another fetch. n_dec counts the decoded
// instructions (0..3), grp[0..n_dec-1] holds their microoperation groups and
// cplx_wait marks a cycle in which a complex instruction in slot 2 or 3 cut
// decoding short. Nothing decodes while en is low.
//
// The slot rule is the document's; ending at taken branches follows its
// remark that three complex decoders are limited only by taken branches.
module p6_decoder
  import fu_pkg::*;
(
  input  logic          en,
  input  instr_t [2:0]  slot,
  input  logic [3:0]    count,
  output dgroup_t [2:0] grp,
  output logic [1:0]    n_dec,
  output logic          cplx_wait
);
  dgroup_t g0, g1, g2;
  logic    ok1, ok2;

  complex_decoder u_cplx (.ins(slot[0]), .grp(g0));
  simple_decoder  u_smp1 (.ins(slot[1]), .ok(ok1), .grp(g1));
  simple_decoder  u_smp2 (.ins(slot[2]), .ok(ok2), .grp(g2));

  function automatic logic ends_fetch(instr_t i);
    return (i.cls == I_JMP) || (i.cls == I_JIND) || (i.cls == I_JCC && i.taken);
  endfunction

  always_comb begin
    grp       = '{g2, g1, g0};
    n_dec     = 2'd0;
    cplx_wait = 1'b0;
    if (en && count >= 4'd1) begin
      n_dec = 2'd1;
      if (count >= 4'd2 && !ends_fetch(slot[0])) begin
        if (!ok1) cplx_wait = 1'b1;
        else begin
          n_dec = 2'd2;
          if (count >= 4'd3 && !ends_fetch(slot[1])) begin
            if (!ok2) cplx_wait = 1'b1;
            else n_dec = 2'd3;
          end
        end
      end
    end
  end
endmodule
