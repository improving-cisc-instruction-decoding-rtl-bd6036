// tb_fill_frontend: end-to-end run of the decoding front end at its default
// sizes (1K-entry 4-way decoded cache).
//
// A small x86 loop is executed by a trace model: instructions are pushed into
// the queue in execution order with each conditional branch's direction.
// The loop holds complex instructions in every slot position, a direct jump,
// an inner branch whose direction changes every fourth iteration
// (mispredictions and back-up into open paths), an indirect jump (finalizes
// lines) and a backward loop branch. During the run the testbench pauses
// retirement (renaming stalls), disables filling for a while and invalidates
// a range of the loop's code (self-modifying code).
//
// Checks: every instruction leaves the queue exactly once and in order; each
// cycle's renamed microoperation count and the sequence of their kinds match
// the reference mappings of the instructions delivered the cycle before; no
// line is written while filling is off; the warm loop decodes faster than the
// cold first pass and at least two instructions per cycle. Every mechanism
// must occur at least once.
module tb_fill_frontend;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0, fill_en;
  logic [1:0] push_n;
  instr_t [2:0] push_data;
  logic [3:0] q_space;
  logic inv_valid;
  addr_t inv_addr;
  logic [6:0] retire_n;
  logic out_valid;
  logic [4:0] out_n;
  ruop_t [LINE_UOPS-1:0] out_uops;
  logic ev_hit, ev_mispredict, ev_stall, ev_cplx_wait, ev_reopen, ev_drop, ev_line_write, inv_busy;
  logic [1:0] n_instr, n_decoded, fin_branch, fin_indirect, fin_full, fin_other;
  logic [10:0] inv_kill;
  logic [6:0] gen_renames, fu_refs;
  logic [4:0] line_ctr;
  logic [2:0][8:0] fu_raddr, fu_waddr;
  logic [2:0][31:0] fu_rdata, fu_wdata, pr_rdata, pr_wdata;
  logic [2:0] fu_we, pr_we;
  logic [2:0][7:0] pr_raddr, pr_waddr;

  fill_frontend dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference microoperation counts (appendix mappings)
  function automatic int nuops(instr_t i);
    case (i.cls)
      I_NOP: return 0;
      I_ALU_RR, I_ALU_RI, I_JCC, I_JMP: return 1;
      I_ALU_MR, I_ADC_MR, I_PUSH_MEM, I_POP_MEM, I_MOVS: return 4;
      I_ALU_RM, I_ADC_RM, I_MUL_RM, I_DIV_RM: return 3;
      I_CMPS: return 5;
      I_JIND: return (i.src1 == R_ESP) ? 3 : 1;
      default: return 2;
    endcase
  endfunction

  // reference microoperation kinds in group order (appendix mappings)
  function automatic string kinds(instr_t i);
    case (i.cls)
      I_ALU_RR, I_ALU_RI: return "C";
      I_JCC, I_JMP: return "B";
      I_ALU_MR: return "ALCS";
      I_ALU_RM: return "ALC";
      I_MOV_LD: return "AL";
      I_PUSH_REG: return "SC";
      I_POP_REG: return "LC";
      I_MOVS: return "LSCC";
      I_CMPS: return "LLCCC";
      I_JIND: return (i.src1 == R_ESP) ? "LCB" : "B";
      default: return "?";
    endcase
  endfunction

  function automatic byte kchar(ukind_e k);
    case (k) U_A: return "A"; U_L: return "L"; U_C: return "C"; U_S: return "S";
      U_B: return "B"; default: return "-"; endcase
  endfunction

  // ---- the program
  instr_t prog [addr_t];
  task automatic put(iclass_e c, int a, int len, int tgt = 0, reg_t s1 = R_EAX);
    instr_t i = '0;
    i.cls = c; i.addr = addr_t'(a); i.len = 4'(len); i.target = addr_t'(tgt);
    i.src1 = s1; i.src2 = R_ECX; i.base = R_EBX; i.index = R_ESI; i.func = 3'd1;
    prog[addr_t'(a)] = i;
  endtask

  localparam int ITER = 60;
  int iter = 0;
  addr_t pc;
  logic done = 0;
  instr_t sent [$];
  int pushed = 0, delivered = 0;
  int exp_uops = 0;

  function automatic instr_t step(inout addr_t p, inout int it, output logic fin);
    instr_t i = prog[p];
    fin = 0;
    case (i.cls)
      I_JCC: begin
        if (p == 'h1009) i.taken = (it % 4) == 3;
        else i.taken = it < ITER - 1;
        p = i.taken ? i.target : p + addr_t'(i.len);
        if (i.addr == 'h1027) it++;
      end
      I_JMP: p = i.target;
      I_JIND: begin
        if (p == 'h1029) fin = 1;
        p = 'h1020;
      end
      default: p = p + addr_t'(i.len);
    endcase
    return i;
  endfunction

  // ---- supply, retire and phases
  int cyc = 0;
  int outstanding = 0;
  logic hold_retire;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    int n;
    logic fin;
    n = 0;
    push_data = '0;
    while (!done && n < 3 && n < int'(q_space)) begin
      push_data[n] = step(pc, iter, fin);
      sent.push_back(push_data[n]);
      n++;
      if (fin) done = 1;
    end
    push_n = 2'(n);
    pushed += n;
    retire_n = hold_retire ? 7'd0 : 7'((outstanding > 12) ? 12 : outstanding);
  end

  // ---- monitors
  int c_hit = 0, c_dec = 0, c_mis = 0, c_stall = 0, c_cw = 0, c_reop = 0, c_wr = 0;
  int c_fb = 0, c_fi = 0, c_ff = 0, c_fo = 0, c_kill = 0, c_fu = 0, c_wrap = 0, c_drop = 0;
  int c_wr_off = 0, off_cycles = 0;
  int prev_expect = -1;
  string prev_kinds = "";
  logic [4:0] prev_ctr = 0;
  int cold_cycles = 0, cold_instr = 0, warm_cycles = 0, warm_instr = 0;

  always @(posedge clk) if (rst_n) begin
    int e;
    // output check for the previous cycle's selection
    if (prev_expect >= 0) chk(int'(out_n) == prev_expect,
                              $sformatf("cycle %0d: %0d uops, expected %0d", cyc, out_n, prev_expect));
    if (prev_expect > 0) begin
      string got;
      got = "";
      for (int k = 0; k < int'(out_n); k++) got = {got, string'(kchar(out_uops[k].kind))};
      chk(got == prev_kinds, $sformatf("cycle %0d: kinds %s, expected %s", cyc, got, prev_kinds));
    end
    e = 0;
    prev_kinds = "";
    for (int k = 0; k < int'(n_instr); k++) begin
      instr_t i;
      if (sent.size() == 0) begin chk(0, "delivered more than pushed"); break; end
      i = sent.pop_front();
      e += nuops(i);
      prev_kinds = {prev_kinds, kinds(i)};
    end
    prev_expect = e;
    delivered += int'(n_instr);
    outstanding += int'(out_n) - int'(retire_n);
    c_hit += ev_hit; c_dec += (n_decoded != 0); c_mis += ev_mispredict; c_stall += ev_stall;
    c_cw += ev_cplx_wait; c_reop += ev_reopen; c_wr += ev_line_write; c_drop += ev_drop;
    c_fb += fin_branch; c_fi += fin_indirect; c_ff += fin_full; c_fo += fin_other;
    c_kill += int'(inv_kill); c_fu += int'(fu_refs);
    if (prev_ctr == 5'd31 && line_ctr == 5'd0) c_wrap++;
    prev_ctr = line_ctr;
    if (!fill_en) begin off_cycles++; if (off_cycles > 5 && ev_line_write) c_wr_off++; end
    else off_cycles = 0;
    if (delivered - int'(n_instr) < 14) begin cold_cycles++; cold_instr += int'(n_instr); end
    if (iter >= 40 && !done) begin warm_cycles++; warm_instr += int'(n_instr); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    put(I_ALU_MR, 'h1000, 3);            // ADD [EBX+ESI],EAX
    put(I_ALU_RI, 'h1003, 3);            // ADD EAX,4
    put(I_ALU_RI, 'h1006, 1, 0, R_ECX);  // INC ECX
    put(I_MOV_LD, 'h1007, 2, 0, R_EDX);  // MOV EDX,[EBX+ESI]
    put(I_JCC,    'h1009, 2, 'h1020);    // inner branch
    put(I_PUSH_REG, 'h100B, 1, 0, R_EDX);
    put(I_CMPS,   'h100C, 1);
    put(I_JMP,    'h100D, 2, 'h100F);    // jump to the next instruction
    put(I_JIND,   'h100F, 2, 0, R_EDX);  // indirect jump to 0x1020
    put(I_POP_REG, 'h1020, 1, 0, R_EBP);
    put(I_ALU_RM, 'h1021, 3);
    put(I_MOVS,   'h1024, 1);
    put(I_ALU_RR, 'h1025, 2);
    put(I_JCC,    'h1027, 2, 'h1000);    // loop branch
    put(I_JIND,   'h1029, 1, 0, R_ESP);  // return
    pc = 'h1000;
    fill_en = 1; inv_valid = 0; inv_addr = 0; hold_retire = 0;
    push_n = 0; push_data = '0; retire_n = 0;
    fu_we = '0; pr_we = '0; fu_raddr = '0; fu_waddr = '0; fu_wdata = '0;
    pr_raddr = '0; pr_waddr = '0; pr_wdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (iter == 10); hold_retire = 1;
    repeat (12) @(posedge clk); hold_retire = 0;
    wait (iter == 20); @(negedge clk); inv_valid = 1; inv_addr = 'h1005;
    @(negedge clk); inv_valid = 0;
    wait (iter == 28); fill_en = 0;
    wait (iter == 32); fill_en = 1;
    wait (done);
    repeat (30) @(posedge clk);
    // register files: write a value to a fill unit name and a physical name
    @(negedge clk);
    fu_we = 3'b001; fu_waddr[0] = 9'h1A5; fu_wdata[0] = 32'hCAFE0001;
    pr_we = 3'b010; pr_waddr[1] = 8'h83; pr_wdata[1] = 32'hBEEF0002;
    @(negedge clk);
    fu_we = '0; pr_we = '0;
    fu_raddr[2] = 9'h1A5; pr_raddr[0] = 8'h83; #1;
    chk(fu_rdata[2] == 32'hCAFE0001, "fill unit register file");
    chk(pr_rdata[0] == 32'hBEEF0002, "physical register file");
    chk(delivered == pushed && sent.size() == 0, $sformatf("all delivered (%0d/%0d)", delivered, pushed));
    $display("cold %0d instr in %0d cycles, warm %0d instr in %0d cycles",
             cold_instr, cold_cycles, warm_instr, warm_cycles);
    $display("hits %0d decode cycles %0d mispredict %0d reopen %0d stall %0d cplx_wait %0d",
             c_hit, c_dec, c_mis, c_reop, c_stall, c_cw);
    $display("writes %0d fin branch %0d indirect %0d full %0d other %0d kills %0d fu refs %0d wraps %0d drops %0d",
             c_wr, c_fb, c_fi, c_ff, c_fo, c_kill, c_fu, c_wrap, c_drop);
    chk(warm_instr * cold_cycles > cold_instr * warm_cycles, "warm loop decodes faster than cold");
    chk(warm_instr >= 2 * warm_cycles, "warm rate at least 2 per cycle");
    chk(c_wr_off == 0, "no line written while filling is off");
    chk(c_hit > 0, "decoded cache hit");
    chk(c_dec > 0, "decoder path used");
    chk(c_mis > 0, "wrong path squashed");
    chk(c_reop > 0, "fill unit backed up into an open path");
    chk(c_stall > 0, "renaming stall");
    chk(c_cw > 0, "complex instruction waited for slot 1");
    chk(c_wr > 0, "lines written");
    chk(c_fb > 0, "finalized by branch");
    chk(c_fi > 0, "finalized by indirect jump");
    chk(c_ff > 0, "finalized full");
    chk(c_fo > 0, "finalized by other cause");
    chk(c_kill > 0, "range invalidation removed lines");
    chk(c_fu > 0, "fill unit registers used");
    chk(c_wrap > 0, "line counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
