// simple_decoder: decoder for decode slots 2 and 3.
//
// Combinational. It accepts only simple instructions, those that become a
// single microoperation: register-to-register and register-immediate ALU
// operations, direct conditional and unconditional branches, and NOP (which
// yields none). For those it raises ok and emits a one-entry group; for any
// other class ok is low and the group is empty, so the instruction must wait
// until it reaches slot 1.
//
// The document defines simple instructions as register-to-register ones that
// produce one microoperation. Counting direct branches and NOP as simple is
// this design's own choice.
module simple_decoder
  import fu_pkg::*;
(
  input  instr_t  ins,
  output logic    ok,
  output dgroup_t grp
);
  always_comb begin
    grp.ins    = ins;
    grp.n_uops = 3'd0;
    for (int i = 0; i < TPL_UOPS; i++) grp.uops[i] = UOP_NONE;
    ok = is_simple_class(ins.cls);
    unique case (ins.cls)
      I_ALU_RR: begin
        grp.uops[0] = mk_uop(U_C, ins.func, ins.src1, R_NONE, 1'b1, ins.src1, ins.src2, R_NONE, 1'b0);
        grp.n_uops  = 3'd1;
      end
      I_ALU_RI: begin
        grp.uops[0] = mk_uop(U_C, ins.func, ins.src1, R_NONE, 1'b1, ins.src1, R_NONE, R_NONE, 1'b0);
        grp.n_uops  = 3'd1;
      end
      I_JCC: begin
        grp.uops[0] = mk_uop(U_B, ins.cond[2:0], R_NONE, R_NONE, 1'b0, R_NONE, R_NONE, R_NONE, 1'b1);
        grp.n_uops  = 3'd1;
      end
      I_JMP: begin
        grp.uops[0] = mk_uop(U_B, 3'd0, R_NONE, R_NONE, 1'b0, R_NONE, R_NONE, R_NONE, 1'b0);
        grp.n_uops  = 3'd1;
      end
      default: ;
    endcase
  end
endmodule
