// tb_complex_decoder: checks the microoperation groups of the complex decoder.
// ADD [EBX+EAX],ECX must give A/L/C/S with MR1..MR3 as drawn in the data-flow
// figure; every class must fit the seven-slot template (1 A, 2 L, 3 C, 1 S)
// and every MR must be written before it is read.
module tb_complex_decoder;
  import fu_pkg::*;
  instr_t  ins;
  dgroup_t grp;
  int checks = 0, failures = 0;

  complex_decoder dut (.ins, .grp);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins = '0;
    ins.cls = I_ALU_MR; ins.base = R_EBX; ins.index = R_EAX; ins.src1 = R_ECX; ins.func = 3'd1;
    #1;
    chk(grp.n_uops == 3'd4, "ADD mem,reg count");
    chk(grp.uops[0].kind == U_A && grp.uops[0].dst == R_MR1 && grp.uops[0].srca == R_EBX
        && grp.uops[0].srcb == R_EAX, "A MR1<-EBX+EAX");
    chk(grp.uops[1].kind == U_L && grp.uops[1].dst == R_MR2 && grp.uops[1].srca == R_MR1, "L MR2<-[MR1]");
    chk(grp.uops[2].kind == U_C && grp.uops[2].dst == R_MR3 && grp.uops[2].srca == R_MR2
        && grp.uops[2].srcb == R_ECX && grp.uops[2].wflags, "C MR3,flags<-MR2+ECX");
    chk(grp.uops[3].kind == U_S && grp.uops[3].srca == R_MR1 && grp.uops[3].srcb == R_MR3, "S [MR1]<-MR3");

    ins.cls = I_CMPS; #1;
    chk(grp.n_uops == 3'd5, "CMPS count");
    ins.cls = I_DIV_RM; ins.src2 = R_EDX; #1;
    chk(grp.uops[2].srcc == R_EDX && grp.uops[2].dst2 == R_EDX, "DIV second source/dest");
    ins.cls = I_POP_REG; ins.src1 = R_EBP; #1;
    chk(grp.uops[0].kind == U_L && grp.uops[0].dst == R_EBP && grp.uops[0].srca == R_ESP, "POP reg load");
    chk(grp.uops[1].dst == R_ESP && grp.uops[1].srca == R_ESP, "POP reg ESP step");

    for (int c = 0; c <= int'(I_JIND); c++) begin
      int na, nl, nc, ns;
      logic [2:0] written;
      uop_t u;
      ins = '0; ins.cls = iclass_e'(c); ins.base = R_EBX; ins.index = R_ESI;
      ins.src1 = R_EAX; ins.src2 = R_EDX;
      #1;
      na = 0; nl = 0; nc = 0; ns = 0; written = '0;
      chk(grp.n_uops <= 3'd7, $sformatf("class %0d size", c));
      for (int k = 0; k < int'(grp.n_uops); k++) begin
        u = grp.uops[k];
        case (u.kind) U_A: na++; U_L: nl++; U_C: nc++; U_S: ns++; default: ; endcase
        if (is_mr(u.srca)) chk(written[u.srca[1:0]], $sformatf("class %0d MR read before write", c));
        if (is_mr(u.srcb)) chk(written[u.srcb[1:0]], $sformatf("class %0d MR read before write", c));
        if (is_mr(u.dst)) written[u.dst[1:0]] = 1'b1;
      end
      chk(na <= 1 && nl <= 2 && nc <= 3 && ns <= 1, $sformatf("class %0d template", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
