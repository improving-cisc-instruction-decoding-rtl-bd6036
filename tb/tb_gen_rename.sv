// tb_gen_rename: renames the document's three-instruction example
//   MR1<-EBX+ESI ; MR2<-[MR1] ; EAX,flags<-EAX+MR2 ; EAX,flags<-EAX+10 ;
//   EBX,flags<-EBX+4
// in one cycle and checks every dependence; then checks that fill unit
// registers pass through, that retired writers are read from the
// architected file, and that ready drops when the buffer is full.
module tb_gen_rename;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, ready, out_valid;
  logic [4:0] in_n, out_n;
  xuop_t [LINE_UOPS-1:0] in_uops;
  ruop_t [LINE_UOPS-1:0] out_uops;
  logic [6:0] retire_n, rob_count;
  logic [6:0] gen_renames, fu_refs;
  int checks = 0, failures = 0;

  gen_rename #(.ROB_N(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic opnd_t rob(int sub, int slot);
    return '{kind: O_ROB, idx: 9'({sub[1:0], slot[5:0]})};
  endfunction
  function automatic opnd_t arch(int l);
    return '{kind: O_ARCH, idx: 9'(l)};
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_n = 0; retire_n = 0;
    for (int k = 0; k < LINE_UOPS; k++) in_uops[k] = to_xuop(UOP_NONE);
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    in_uops[0] = to_xuop(mk_uop(U_A, 0, R_MR1, R_NONE, 0, R_EBX, R_ESI, R_NONE, 0));
    in_uops[1] = to_xuop(mk_uop(U_L, 0, R_MR2, R_NONE, 0, R_MR1, R_NONE, R_NONE, 0));
    in_uops[2] = to_xuop(mk_uop(U_C, 0, R_EAX, R_NONE, 1, R_EAX, R_MR2, R_NONE, 0));
    in_uops[3] = to_xuop(mk_uop(U_C, 0, R_EAX, R_NONE, 1, R_EAX, R_NONE, R_NONE, 0));
    in_uops[4] = to_xuop(mk_uop(U_C, 0, R_EBX, R_NONE, 1, R_EBX, R_NONE, R_NONE, 0));
    in_valid = 1; in_n = 5;
    chk(ready, "ready when empty");
    @(negedge clk);
    in_valid = 0;
    chk(out_valid && out_n == 5, "one cycle later");
    chk(out_uops[0].srca == arch(3) && out_uops[0].srcb == arch(6), "EBX, ESI from file");
    chk(out_uops[0].dst == rob(0, 0), "MR1 -> slot 0");
    chk(out_uops[1].srca == rob(0, 0) && out_uops[1].dst == rob(0, 1), "MR2 <- [MR1]");
    chk(out_uops[2].srca == arch(0) && out_uops[2].srcb == rob(0, 1), "EAX + MR2");
    chk(out_uops[2].dst == rob(0, 2) && out_uops[2].fdst == rob(2, 2), "EAX, flags defs");
    chk(out_uops[3].srca == rob(0, 2) && out_uops[3].dst == rob(0, 3), "second EAX");
    chk(out_uops[4].srca == arch(3) && out_uops[4].fdst == rob(2, 4), "EBX + 4");
    chk(gen_renames == 7'd15, $sformatf("15 general renames (%0d)", gen_renames));
    // next cycle: reads see the earlier cycle's writers
    in_uops[0] = to_xuop(mk_uop(U_B, 0, R_NONE, R_NONE, 0, R_EAX, R_NONE, R_NONE, 1));
    in_uops[1] = '0; in_uops[1].kind = U_C;
    in_uops[1].dst = '{1'b1, 9'h123}; in_uops[1].srca = '{1'b1, 9'h045};
    in_uops[1].srcb = to_x(R_NONE); in_uops[1].srcc = to_x(R_NONE); in_uops[1].dst2 = to_x(R_NONE);
    in_valid = 1; in_n = 2;
    @(negedge clk);
    in_valid = 0;
    chk(out_uops[0].srca == rob(0, 3) && out_uops[0].fsrc == rob(2, 4), "latest EAX and flags");
    chk(out_uops[1].dst == '{O_FU, 9'h123} && out_uops[1].srca == '{O_FU, 9'h045}, "fill unit regs pass");
    chk(fu_refs == 7'd2 && gen_renames == 7'd2, "counts");
    // retire everything: sources come from the architected file
    retire_n = 7; @(negedge clk); retire_n = 0;
    in_uops[0] = to_xuop(mk_uop(U_B, 0, R_NONE, R_NONE, 0, R_EAX, R_NONE, R_NONE, 1));
    in_valid = 1; in_n = 1;
    @(negedge clk); in_valid = 0;
    chk(out_uops[0].srca == arch(0) && out_uops[0].fsrc == arch(8), "retired -> architected");
    chk(out_uops[0].kind == U_B, "kind kept");
    // fill: 1 + 21 + 21 = 43 still leaves room for a line, 64 does not
    for (int k = 0; k < LINE_UOPS; k++) in_uops[k] = to_xuop(mk_uop(U_C, 0, R_ECX, R_NONE, 0, R_ECX, R_NONE, R_NONE, 0));
    in_valid = 1; in_n = 21; @(negedge clk);
    @(negedge clk);
    chk(ready && rob_count == 7'd43, "still ready at 43");
    @(negedge clk); in_valid = 0;
    chk(!ready && rob_count == 7'd64, "not ready when full");
    @(negedge clk);
    chk(rob_count == 7'd64, "nothing accepted while full");
    retire_n = 30; @(negedge clk); retire_n = 0;
    chk(ready && rob_count == 7'd34, "ready again after retirement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
