// complex_decoder: decode slot 1 decoder that may emit several microoperations.
//
// Combinational. It maps any instruction class onto a group of at most seven
// microoperations shaped like the resource template (one address generation,
// up to two loads, up to three computations, one store). Values that pass
// between the microoperations of one instruction use MR1-MR3. The group lists
// its microoperations in data-flow order, so a renamer that walks the group
// front to back sees every producer before its consumer.
//
// The mappings follow the appendix data-flow graphs of the document: for
// example ADD mem,reg becomes A(MR1<-base+index), L(MR2<-[MR1]),
// C(MR3,flags<-MR2 op src1), S([MR1]<-MR3). LODS uses EDI as its printed
// figure shows, and POP reg is mapped to a load from [ESP] (its figure marks
// that microoperation S, taken here to be the load it must be). The group
// order, the return mapping (load of [ESP], ESP step, branch on the loaded
// value) and the register-field conventions are this design's own.
module complex_decoder
  import fu_pkg::*;
(
  input  instr_t  ins,
  output dgroup_t grp
);
  always_comb begin
    uop_t u [TPL_UOPS];
    int unsigned n;
    for (int i = 0; i < TPL_UOPS; i++) u[i] = UOP_NONE;
    n = 0;
    unique case (ins.cls)
      I_NOP: n = 0;
      I_ALU_RR: begin
        u[0] = mk_uop(U_C, ins.func, ins.src1, R_NONE, 1'b1, ins.src1, ins.src2, R_NONE, 1'b0);
        n = 1;
      end
      I_ALU_RI: begin
        u[0] = mk_uop(U_C, ins.func, ins.src1, R_NONE, 1'b1, ins.src1, R_NONE, R_NONE, 1'b0);
        n = 1;
      end
      I_ALU_MR, I_ADC_MR: begin
        u[0] = mk_uop(U_A, 3'd0, R_MR1, R_NONE, 1'b0, ins.base, ins.index, R_NONE, 1'b0);
        u[1] = mk_uop(U_L, 3'd0, R_MR2, R_NONE, 1'b0, R_MR1, R_NONE, R_NONE, 1'b0);
        u[2] = mk_uop(U_C, ins.func, R_MR3, R_NONE, 1'b1, R_MR2, ins.src1, R_NONE,
                      ins.cls == I_ADC_MR);
        u[3] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_MR1, R_MR3, R_NONE, 1'b0);
        n = 4;
      end
      I_ALU_RM, I_ADC_RM, I_MUL_RM, I_DIV_RM: begin
        u[0] = mk_uop(U_A, 3'd0, R_MR1, R_NONE, 1'b0, ins.base, ins.index, R_NONE, 1'b0);
        u[1] = mk_uop(U_L, 3'd0, R_MR2, R_NONE, 1'b0, R_MR1, R_NONE, R_NONE, 1'b0);
        u[2] = mk_uop(U_C, ins.func, ins.src1,
                      (ins.cls inside {I_MUL_RM, I_DIV_RM}) ? ins.src2 : R_NONE, 1'b1,
                      R_MR2, ins.src1, (ins.cls == I_DIV_RM) ? ins.src2 : R_NONE,
                      ins.cls == I_ADC_RM);
        n = 3;
      end
      I_MOV_LD: begin
        u[0] = mk_uop(U_A, 3'd0, R_MR1, R_NONE, 1'b0, ins.base, ins.index, R_NONE, 1'b0);
        u[1] = mk_uop(U_L, 3'd0, ins.src1, R_NONE, 1'b0, R_MR1, R_NONE, R_NONE, 1'b0);
        n = 2;
      end
      I_MOV_ST: begin
        u[0] = mk_uop(U_A, 3'd0, R_MR1, R_NONE, 1'b0, ins.base, ins.index, R_NONE, 1'b0);
        u[1] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_MR1, ins.src1, R_NONE, 1'b0);
        n = 2;
      end
      I_PUSH_REG: begin
        u[0] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_ESP, ins.src1, R_NONE, 1'b0);
        u[1] = mk_uop(U_C, F_STEP, R_ESP, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
        n = 2;
      end
      I_PUSH_MEM: begin
        u[0] = mk_uop(U_A, 3'd0, R_MR1, R_NONE, 1'b0, ins.base, ins.index, R_NONE, 1'b0);
        u[1] = mk_uop(U_L, 3'd0, R_MR2, R_NONE, 1'b0, R_MR1, R_NONE, R_NONE, 1'b0);
        u[2] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_ESP, R_MR2, R_NONE, 1'b0);
        u[3] = mk_uop(U_C, F_STEP, R_ESP, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
        n = 4;
      end
      I_POP_REG: begin
        u[0] = mk_uop(U_L, 3'd0, ins.src1, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
        u[1] = mk_uop(U_C, F_STEP, R_ESP, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
        n = 2;
      end
      I_POP_MEM: begin
        u[0] = mk_uop(U_A, 3'd0, R_MR1, R_NONE, 1'b0, ins.base, ins.index, R_NONE, 1'b0);
        u[1] = mk_uop(U_L, 3'd0, R_MR2, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
        u[2] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_MR1, R_MR2, R_NONE, 1'b0);
        u[3] = mk_uop(U_C, F_STEP, R_ESP, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
        n = 4;
      end
      I_LODS: begin
        u[0] = mk_uop(U_L, 3'd0, R_EAX, R_NONE, 1'b0, R_EDI, R_NONE, R_NONE, 1'b0);
        u[1] = mk_uop(U_C, F_STEP, R_EDI, R_NONE, 1'b0, R_EDI, R_NONE, R_NONE, 1'b0);
        n = 2;
      end
      I_STOS: begin
        u[0] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_EDI, R_EAX, R_NONE, 1'b0);
        u[1] = mk_uop(U_C, F_STEP, R_EDI, R_NONE, 1'b0, R_EDI, R_NONE, R_NONE, 1'b0);
        n = 2;
      end
      I_MOVS: begin
        u[0] = mk_uop(U_L, 3'd0, R_MR1, R_NONE, 1'b0, R_ESI, R_NONE, R_NONE, 1'b0);
        u[1] = mk_uop(U_S, 3'd0, R_NONE, R_NONE, 1'b0, R_EDI, R_MR1, R_NONE, 1'b0);
        u[2] = mk_uop(U_C, F_STEP, R_ESI, R_NONE, 1'b0, R_ESI, R_NONE, R_NONE, 1'b0);
        u[3] = mk_uop(U_C, F_STEP, R_EDI, R_NONE, 1'b0, R_EDI, R_NONE, R_NONE, 1'b0);
        n = 4;
      end
      I_CMPS: begin
        u[0] = mk_uop(U_L, 3'd0, R_MR1, R_NONE, 1'b0, R_ESI, R_NONE, R_NONE, 1'b0);
        u[1] = mk_uop(U_L, 3'd0, R_MR2, R_NONE, 1'b0, R_EDI, R_NONE, R_NONE, 1'b0);
        u[2] = mk_uop(U_C, ins.func, R_NONE, R_NONE, 1'b1, R_MR1, R_MR2, R_NONE, 1'b0);
        u[3] = mk_uop(U_C, F_STEP, R_ESI, R_NONE, 1'b0, R_ESI, R_NONE, R_NONE, 1'b0);
        u[4] = mk_uop(U_C, F_STEP, R_EDI, R_NONE, 1'b0, R_EDI, R_NONE, R_NONE, 1'b0);
        n = 5;
      end
      I_JCC: begin
        u[0] = mk_uop(U_B, ins.cond[2:0], R_NONE, R_NONE, 1'b0, R_NONE, R_NONE, R_NONE, 1'b1);
        n = 1;
      end
      I_JMP: begin
        u[0] = mk_uop(U_B, 3'd0, R_NONE, R_NONE, 1'b0, R_NONE, R_NONE, R_NONE, 1'b0);
        n = 1;
      end
      I_JIND: begin
        if (ins.src1 == R_ESP) begin  // return: target popped from the stack
          u[0] = mk_uop(U_L, 3'd0, R_MR1, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
          u[1] = mk_uop(U_C, F_STEP, R_ESP, R_NONE, 1'b0, R_ESP, R_NONE, R_NONE, 1'b0);
          u[2] = mk_uop(U_B, 3'd0, R_NONE, R_NONE, 1'b0, R_MR1, R_NONE, R_NONE, 1'b0);
          n = 3;
        end else begin
          u[0] = mk_uop(U_B, 3'd0, R_NONE, R_NONE, 1'b0, ins.src1, R_NONE, R_NONE, 1'b0);
          n = 1;
        end
      end
      default: n = 0;
    endcase
    grp.ins    = ins;
    grp.n_uops = 3'(n);
    for (int i = 0; i < TPL_UOPS; i++) grp.uops[i] = u[i];
  end
endmodule
