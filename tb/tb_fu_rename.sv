// tb_fu_rename: line registers get {line counter, number}; architected ones
// pass; the counter advances once per line taken and wraps at 32.
module tb_fu_rename;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0, take;
  logic [4:0] n_uops;
  uop_t [LINE_UOPS-1:0] in_uops;
  xuop_t [LINE_UOPS-1:0] out_uops;
  logic [4:0] ctr;
  logic [5:0] fu_reads, fu_writes;
  int checks = 0, failures = 0;

  fu_rename dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    take = 0;
    for (int k = 0; k < LINE_UOPS; k++) in_uops[k] = UOP_NONE;
    // A MR1<-EBX+ESI ; L MR2<-[MR1] ; C line reg 8 <- EAX + MR2
    in_uops[0] = mk_uop(U_A, 0, R_MR1, R_NONE, 0, R_EBX, R_ESI, R_NONE, 0);
    in_uops[1] = mk_uop(U_L, 0, R_MR2, R_NONE, 0, R_MR1, R_NONE, R_NONE, 0);
    in_uops[2] = mk_uop(U_C, 0, 5'd24, R_NONE, 1, R_EAX, R_MR2, R_NONE, 0);
    n_uops = 5'd3;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int line = 0; line < 40; line++) begin
      @(negedge clk);
      chk(ctr == 5'(line), "counter value");
      chk(out_uops[0].dst.fu && out_uops[0].dst.idx == {5'(line), 4'd0}, "MR1 name");
      chk(!out_uops[0].srca.fu && out_uops[0].srca.idx[4:0] == R_EBX, "EBX passes");
      chk(out_uops[1].srca.fu && out_uops[1].srca.idx == {5'(line), 4'd0}, "MR1 read name");
      chk(out_uops[2].dst.fu && out_uops[2].dst.idx == {5'(line), 4'd8}, "line reg 8 name");
      chk(fu_reads == 6'd2 && fu_writes == 6'd3, "reference counts");
      take = 1;
      @(negedge clk);
      take = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
