// tb_p6_decoder: slot rule and decode rate of the one-complex, two-simple
// decoder. The sequence simple, complex, simple, complex must take three
// cycles (1, then 2, then 1 instructions); three simple ones take one cycle;
// a taken branch ends the cycle's decoding.
module tb_p6_decoder;
  import fu_pkg::*;
  logic          en;
  instr_t [2:0]  slot;
  logic [3:0]    count;
  dgroup_t [2:0] grp;
  logic [1:0]    n_dec;
  logic          cplx_wait;
  int checks = 0, failures = 0;

  p6_decoder dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t mk(iclass_e c, int a);
    instr_t i = '0;
    i.cls = c; i.addr = addr_t'(a); i.src1 = R_EAX; i.src2 = R_ECX;
    i.base = R_EBX; i.index = R_ESI;
    return i;
  endfunction

  // decode a program through the slots; returns cycles and per-cycle counts
  task automatic run(input instr_t prog [$], output int cycles, output int cnt [$]);
    int pos = 0;
    cycles = 0;
    cnt = {};
    while (pos < prog.size() && cycles < 20) begin
      for (int i = 0; i < 3; i++) slot[i] = (pos + i < prog.size()) ? prog[pos + i] : '0;
      count = 4'((prog.size() - pos > 3) ? 3 : prog.size() - pos);
      #1;
      cnt.push_back(int'(n_dec));
      pos += int'(n_dec);
      cycles++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int cnt [$];
    instr_t prog [$];
    en = 1;
    prog = '{mk(I_ALU_RR, 0), mk(I_ALU_MR, 2), mk(I_ALU_RI, 5), mk(I_ALU_MR, 8)};
    run(prog, cyc, cnt);
    chk(cyc == 3, $sformatf("s,c,s,c takes 3 cycles (%0d)", cyc));
    chk(cnt.size() == 3 && cnt[0] == 1 && cnt[1] == 2 && cnt[2] == 1, "per-cycle 1,2,1");

    prog = '{mk(I_ALU_MR, 0), mk(I_ALU_RR, 2), mk(I_ALU_RI, 5)};
    run(prog, cyc, cnt);
    chk(cyc == 1, "complex, simple, simple in one cycle");
    chk(grp[0].n_uops == 3'd4 && grp[1].n_uops == 3'd1 && grp[2].n_uops == 3'd1, "group sizes");

    prog = '{mk(I_ALU_RR, 0), mk(I_MOV_LD, 2), mk(I_ALU_RR, 5)};
    slot = '{prog[2], prog[1], prog[0]}; count = 4'd3; #1;
    chk(n_dec == 2'd1 && cplx_wait, "complex in slot 2 waits");

    prog = '{mk(I_ALU_RR, 0), mk(I_JMP, 2), mk(I_ALU_RR, 5)};
    slot = '{prog[2], prog[1], prog[0]}; count = 4'd3; #1;
    chk(n_dec == 2'd2 && !cplx_wait, "decoding ends after a jump");

    prog = '{mk(I_JCC, 0), mk(I_ALU_RR, 2), mk(I_ALU_RR, 5)};
    slot = '{prog[2], prog[1], prog[0]}; #1;
    chk(n_dec == 2'd3, "untaken branch does not end decoding");
    slot[0].taken = 1'b1; #1;
    chk(n_dec == 2'd1, "taken branch ends decoding");

    count = 4'd2; slot[0].taken = 1'b0; #1;
    chk(n_dec == 2'd2, "count limits decoding");
    en = 0; #1;
    chk(n_dec == 2'd0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
