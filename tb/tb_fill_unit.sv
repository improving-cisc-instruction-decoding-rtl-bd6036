// tb_fill_unit: builds tree-like lines from decoded groups and checks the
// lines written: both paths up to the branch, the followed path continuing,
// the open short path, MR renumbering, the two tags, every finalization cause, the
// more-than-one-instruction rule, back-up into an open path, and a dropped
// line when the write queue (one entry here) overflows.
module tb_fill_unit;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic [1:0] dec_n;
  dgroup_t [2:0] dec_grp;
  logic hit_valid, hit_path, wr_valid, reopen, drop;
  addr_t hit_entry, wr_entry;
  dline_t hit_line, wr_line;
  logic [1:0] fin_branch, fin_indirect, fin_full, fin_other;
  int checks = 0, failures = 0;
  int n_br = 0, n_ind = 0, n_full = 0, n_oth = 0, n_drop = 0;
  addr_t   w_entry [$];
  dline_t  w_line [$];

  fill_unit #(.WR_FIFO(1)) dut (.*);
  complex_decoder u_d0 (.ins(ins[0]), .grp(dg[0]));
  complex_decoder u_d1 (.ins(ins[1]), .grp(dg[1]));
  complex_decoder u_d2 (.ins(ins[2]), .grp(dg[2]));
  instr_t ins [3];
  dgroup_t dg [3];
  assign dec_grp = '{dg[2], dg[1], dg[0]};

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (wr_valid) begin w_entry.push_back(wr_entry); w_line.push_back(wr_line); end
    n_br += fin_branch; n_ind += fin_indirect; n_full += fin_full; n_oth += fin_other;
    n_drop += drop;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t mk(iclass_e c, int a, int len, int tgt = 0, logic tk = 0);
    instr_t i = '0;
    i.cls = c; i.addr = addr_t'(a); i.len = 4'(len); i.target = addr_t'(tgt); i.taken = tk;
    i.src1 = R_EAX; i.src2 = R_ECX; i.base = R_EBX; i.index = R_ESI;
    return i;
  endfunction

  task automatic feed(input instr_t a [$]);
    @(negedge clk);
    dec_n = 2'(a.size());
    for (int k = 0; k < 3; k++) ins[k] = (k < a.size()) ? a[k] : '0;
    @(negedge clk);
    dec_n = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dline_t l;
    en = 1; dec_n = 0; hit_valid = 0; hit_path = 0; hit_entry = 0; hit_line = '0;
    for (int k = 0; k < 3; k++) ins[k] = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1: ADD mem,reg ; JCC taken -> 0x200 ; ADD reg,mem at target : path 1 full
    feed('{mk(I_ALU_MR, 'h100, 3), mk(I_JCC, 'h103, 2, 'h200, 1), mk(I_ALU_RM, 'h200, 4)});
    @(negedge clk);
    chk(w_entry.size() == 1 && w_entry[0] == 'h100, "tree line written");
    l = w_line[0];
    chk(l.has_br && l.br_pos == 2'd1 && l.br_addr == 'h200 && l.br_iaddr == 'h103, "branch fields");
    chk(l.path[0].n_instr == 2'd2 && l.path[0].n_uops == 5'd5 && l.path[0].next == 'h105
        && l.path[0].open, "untaken short path");
    chk(l.path[1].n_instr == 2'd3 && l.path[1].n_uops == 5'd8 && l.path[1].next == 'h204
        && !l.path[1].open, "taken path full");
    chk(l.path[0].uops[3] == l.path[1].uops[3] && l.path[0].uops[4].kind == U_B, "same up to branch");
    chk(l.path[1].uops[0].dst == 5'd16 && l.path[1].uops[5].dst == 5'd22
        && l.path[1].uops[6].srca == 5'd22, "MR renumbered per instruction");
    chk(l.tgt_valid && l.tgt_addr == 'h200, "target tag");
    chk(n_full == 1, "finalized as full");

    // 2: one instruction then an indirect jump -> not stored
    feed('{mk(I_ALU_RR, 'h300, 2), mk(I_JIND, 'h302, 2)});
    @(negedge clk);
    chk(w_entry.size() == 1 && n_ind == 1, "single-instruction line dropped, indirect cause");

    // 3: back-up into the open untaken path
    @(negedge clk);
    hit_valid = 1; hit_entry = 'h100; hit_path = 0; hit_line = l;
    #1 chk(reopen, "reopen on open path");
    @(negedge clk); hit_valid = 0;
    feed('{mk(I_ALU_RR, 'h105, 2)});
    @(negedge clk);
    chk(w_entry.size() == 2 && w_entry[1] == 'h100, "reopened line written back");
    chk(w_line[1].path[0].n_instr == 2'd3 && w_line[1].path[0].next == 'h107
        && !w_line[1].path[0].open, "untaken path extended");
    chk(w_line[1].path[1] == l.path[1], "taken path kept");

    // 4: unconditional jump ends the line, target is next address
    feed('{mk(I_ALU_RR, 'h400, 2), mk(I_JMP, 'h402, 2, 'h500)});
    @(negedge clk);
    chk(w_entry.size() == 3 && w_line[2].path[0].next == 'h500 && !w_line[2].has_br, "jump line");
    chk(n_br == 1, "jump counted as branch finalization");

    // 5: discontinuity and a second conditional branch
    feed('{mk(I_ALU_RR, 'h600, 2), mk(I_ALU_RR, 'h602, 2)});
    feed('{mk(I_ALU_RR, 'h800, 2), mk(I_JCC, 'h802, 2, 'h900, 0)});
    feed('{mk(I_JCC, 'h804, 2, 'h900, 0)});
    @(negedge clk);
    chk(w_entry.size() == 5 && w_entry[3] == 'h600 && w_entry[4] == 'h800, "two lines");
    chk(w_line[4].path[0].n_instr == 2'd2 && w_line[4].path[1].next == 'h900, "second branch ends line");
    chk(n_oth == 1 && n_br == 2, "causes counted");

    // 6: write queue overflow: two lines finish in one cycle
    feed('{mk(I_ALU_RR, 'hA00, 2), mk(I_ALU_RR, 'hA02, 2)});
    feed('{mk(I_ALU_RR, 'hC00, 2), mk(I_JMP, 'hC02, 2, 'hD00)});
    @(negedge clk);
    chk(n_drop == 1, "one line dropped");

    // 7: disabled
    en = 0;
    feed('{mk(I_ALU_RR, 'hE00, 2), mk(I_ALU_RR, 'hE02, 2), mk(I_ALU_RR, 'hE04, 2)});
    @(negedge clk);
    chk(w_entry[w_entry.size() - 1] != 'hE00, "nothing filled while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
