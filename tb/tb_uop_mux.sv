// tb_uop_mux: decoder groups are packed back to back; a hit passes the
// cache path through.
module tb_uop_mux;
  import fu_pkg::*;
  logic sel_dic;
  logic [4:0] dic_n, out_n;
  xuop_t [LINE_UOPS-1:0] dic_uops, out_uops;
  logic [1:0] n_dec;
  dgroup_t [2:0] dec_grp;
  int checks = 0, failures = 0;

  uop_mux dut (.*);

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
    dec_grp = '0;
    for (int g = 0; g < 3; g++)
      for (int j = 0; j < TPL_UOPS; j++)
        dec_grp[g].uops[j] = mk_uop(U_C, 3'(g), 5'(j), R_NONE, 0, R_NONE, R_NONE, R_NONE, 0);
    dec_grp[0].n_uops = 3'd4; dec_grp[1].n_uops = 3'd1; dec_grp[2].n_uops = 3'd2;
    for (int k = 0; k < LINE_UOPS; k++) begin
      dic_uops[k] = '0; dic_uops[k].kind = U_L; dic_uops[k].dst = '{1'b1, 9'(k)};
    end
    sel_dic = 0; n_dec = 2'd3; dic_n = 5'd9; #1;
    chk(out_n == 5'd7, "packed count");
    chk(out_uops[3].func == 3'd0 && out_uops[3].dst.idx == 9'd3, "group 0 last");
    chk(out_uops[4].func == 3'd1 && out_uops[4].dst.idx == 9'd0, "group 1 first");
    chk(out_uops[5].func == 3'd2 && out_uops[6].dst.idx == 9'd1, "group 2");
    chk(out_uops[7].kind == U_NONE, "empty after");
    n_dec = 2'd1; #1;
    chk(out_n == 5'd4 && out_uops[4].kind == U_NONE, "one group");
    sel_dic = 1; #1;
    chk(out_n == 5'd9 && out_uops[8].kind == U_L && out_uops[8].dst.fu && out_uops[8].dst.idx == 9'd8, "cache path");
    chk(out_uops[9].kind == U_NONE, "cache path limited to count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
