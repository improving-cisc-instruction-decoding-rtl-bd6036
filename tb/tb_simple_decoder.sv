// tb_simple_decoder: simple classes decode to one microoperation, the
// others are refused.
module tb_simple_decoder;
  import fu_pkg::*;
  instr_t  ins;
  logic    ok;
  dgroup_t grp;
  int checks = 0, failures = 0;

  simple_decoder dut (.ins, .ok, .grp);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins = '0;
    ins.cls = I_ALU_RR; ins.src1 = R_EAX; ins.src2 = R_ECX; ins.func = 3'd2; #1;
    chk(ok && grp.n_uops == 3'd1, "RR accepted");
    chk(grp.uops[0].kind == U_C && grp.uops[0].dst == R_EAX && grp.uops[0].srca == R_EAX
        && grp.uops[0].srcb == R_ECX && grp.uops[0].wflags && grp.uops[0].func == 3'd2, "RR uop");
    ins.cls = I_ALU_RI; #1;
    chk(ok && grp.uops[0].srcb == R_NONE, "RI uop");
    ins.cls = I_JCC; ins.cond = 4'd5; #1;
    chk(ok && grp.uops[0].kind == U_B && grp.uops[0].rflags, "JCC uop");
    for (int c = 0; c <= int'(I_JIND); c++) begin
      ins.cls = iclass_e'(c); #1;
      chk(ok == (c inside {I_NOP, I_ALU_RR, I_ALU_RI, I_JCC, I_JMP}), $sformatf("class %0d ok", c));
      if (!ok) chk(grp.n_uops == 0, "refused empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
