// fill_unit: builds tree-like decoded instruction cache lines.
//
// The unit watches the instructions leaving the decoders (up to three groups
// per cycle, in program order) and appends their microoperations to the line
// it is building. A line starts at the first instruction that arrives while
// no line is open. Microarchitected registers are renumbered on the way in:
// MRk of the n-th instruction of a path becomes line register 3n+k-1, so a
// line uses at most nine (0..8).
//
// Until the first conditional branch both paths receive the same
// microoperations. The branch itself goes into both paths and into the
// condition / branch-address fields; the untaken path's next address becomes
// the fall-through address and the taken path's the target. Filling then
// continues only on the path the execution followed (the instruction's taken
// bit); the other path stays open, as a short path that a later fill can extend.
// Instructions added after the branch on the taken path set the second tag
// (target address) used for invalidation.
//
// A line is finalized when: a path holds three instructions (21
// microoperations); an unconditional direct jump was added (its target goes
// into the next address); a second conditional branch arrives (one branch per
// line); a return or indirect jump arrives (it is not filled); an instruction
// does not continue the path (wrong next address); or the decoded cache
// supplies a line. A finalized line is kept only if one of its paths holds
// more than one instruction, or if it was reopened from the cache.
//
// Back-up: when the decoded cache supplies a path that is still open
// (hit_valid with hit_line.path[hit_path].open), the unit loads that line and
// continues to fill the open path with the instructions decoded next.
//
// Kept lines enter a WR_FIFO-deep queue and leave it one per cycle on
// wr_valid/wr_entry/wr_line, the next cycle at the earliest. A line that finds
// the queue full is dropped and reported on drop. Per-cycle counts of
// finalizations by cause are outputs. With en low the open line is abandoned.
//
// The line format, the one-branch rule, the both-paths filling, the
// more-than-one-instruction rule, the back-up and the two tags are the
// document's. Not filling indirect jumps, the renumbering rule, the write
// queue and finalizing on a cache hit are this design's own.
module fill_unit
  import fu_pkg::*;
#(
  parameter int unsigned WR_FIFO = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  // decoded instructions, oldest first
  input  logic [1:0]    dec_n,
  input  dgroup_t [2:0] dec_grp,
  // decoded instruction cache supplied a line this cycle
  input  logic          hit_valid,
  input  addr_t         hit_entry,
  input  logic          hit_path,
  input  dline_t        hit_line,
  // line write to the decoded instruction cache
  output logic          wr_valid,
  output addr_t         wr_entry,
  output dline_t        wr_line,
  // statistics, per cycle
  output logic [1:0]    fin_branch,
  output logic [1:0]    fin_indirect,
  output logic [1:0]    fin_full,
  output logic [1:0]    fin_other,
  output logic          reopen,
  output logic          drop
);
  typedef struct packed {
    logic   busy;
    logic   reop;
    logic   cur;
    addr_t  entry;
    dline_t line;
  } fstate_t;

  typedef struct packed {
    addr_t  entry;
    dline_t line;
  } wentry_t;

  fstate_t st, nx;
  wentry_t fin [4];
  logic [2:0] nfin;

  wentry_t fifo [WR_FIFO];
  logic [$clog2(WR_FIFO)-1:0] fhead;
  logic [$clog2(WR_FIFO+1)-1:0] fcount;

  // line register number for MR k of the n-th instruction of a path
  function automatic reg_t remap(reg_t r, logic [1:0] n);
    if (is_mr(r)) return 5'd16 + 5'(n) * 5'd3 + {1'b0, r[3:0]};
    return r;
  endfunction

  function automatic lpath_t add_group(lpath_t p, dgroup_t g);
    lpath_t q = p;
    for (int j = 0; j < TPL_UOPS; j++) begin
      if (j < int'(g.n_uops)) begin
        uop_t u = g.uops[j];
        u.dst  = remap(u.dst,  p.n_instr);
        u.dst2 = remap(u.dst2, p.n_instr);
        u.srca = remap(u.srca, p.n_instr);
        u.srcb = remap(u.srcb, p.n_instr);
        u.srcc = remap(u.srcc, p.n_instr);
        q.uops[int'(p.n_uops) + j] = u;
      end
    end
    q.n_uops  = p.n_uops + 5'(g.n_uops);
    q.n_instr = p.n_instr + 2'd1;
    q.next    = g.ins.addr + addr_t'(g.ins.len);
    return q;
  endfunction

  always_comb begin
    fstate_t s;
    logic [1:0] cb, ci, cf, co;
    s = st;
    nfin = '0;
    cb = '0; ci = '0; cf = '0; co = '0;
    for (int k = 0; k < 4; k++) fin[k] = '0;
    reopen = 1'b0;

    // --- cache supplied a line: close the line being built, maybe back up
    if (hit_valid) begin
      if (s.busy) begin
        co = co + 2'd1;
        for (int p = 0; p < 2; p++)
          if (!s.line.has_br || p == int'(s.cur) || s.line.path[p].n_instr == 2'd3)
            s.line.path[p].open = 1'b0;
        if (s.reop || s.line.path[0].n_instr > 2'd1 || s.line.path[1].n_instr > 2'd1) begin
          fin[nfin[1:0]] = '{s.entry, s.line};
          nfin = nfin + 3'd1;
        end
        s.busy = 1'b0;
      end
      if (en && hit_line.has_br && hit_line.path[hit_path].open) begin
        s.busy  = 1'b1;
        s.reop  = 1'b1;
        s.cur   = hit_path;
        s.entry = hit_entry;
        s.line  = hit_line;
        reopen  = 1'b1;
      end
    end

    // --- decoded instructions
    for (int k = 0; k < 3; k++) begin
      if (k < int'(dec_n)) begin
        automatic dgroup_t g = dec_grp[k];
        automatic instr_t  i = g.ins;
        logic    close;
        logic [1:0] why;  // 0 other, 1 branch, 2 indirect, 3 full
        // finalize before adding?
        close = 1'b0;
        why   = 2'd0;
        if (s.busy) begin
          if (i.addr != s.line.path[s.cur].next) begin close = 1'b1; why = 2'd0; end
          else if (i.cls == I_JCC && s.line.has_br) begin close = 1'b1; why = 2'd1; end
          else if (i.cls == I_JIND) begin close = 1'b1; why = 2'd2; end
        end
        for (int pass = 0; pass < 2; pass++) begin
          if (close && s.busy) begin
            unique case (why)
              2'd0: co = co + 2'd1;
              2'd1: cb = cb + 2'd1;
              2'd2: ci = ci + 2'd1;
              default: cf = cf + 2'd1;
            endcase
            for (int p = 0; p < 2; p++)
              if (!s.line.has_br || p == int'(s.cur) || s.line.path[p].n_instr == 2'd3)
                s.line.path[p].open = 1'b0;
            if ((s.reop || s.line.path[0].n_instr > 2'd1 || s.line.path[1].n_instr > 2'd1)
                && nfin < 3'd4) begin
              fin[nfin[1:0]] = '{s.entry, s.line};
              nfin = nfin + 3'd1;
            end
            s.busy = 1'b0;
          end
          close = 1'b0;
          if (pass == 0 && en && i.cls != I_JIND) begin
            if (!s.busy) begin
              s = '0;
              s.busy  = 1'b1;
              s.entry = i.addr;
              for (int p = 0; p < 2; p++) begin
                s.line.path[p].open = 1'b1;
                s.line.path[p].next = i.addr;
              end
            end
            if (!s.line.has_br) begin
              for (int p = 0; p < 2; p++) s.line.path[p] = add_group(s.line.path[p], g);
              if (i.cls == I_JCC) begin
                s.line.has_br   = 1'b1;
                s.line.br_pos   = s.line.path[0].n_instr - 2'd1;
                s.line.br_cond  = i.cond;
                s.line.br_iaddr = i.addr;
                s.line.br_addr  = i.target;
                s.line.path[1].next = i.target;
                s.cur = i.taken;
              end else if (i.cls == I_JMP) begin
                for (int p = 0; p < 2; p++) s.line.path[p].next = i.target;
              end
            end else begin
              s.line.path[s.cur] = add_group(s.line.path[s.cur], g);
              if (i.cls == I_JMP) s.line.path[s.cur].next = i.target;
              if (s.cur && !s.line.tgt_valid) begin
                s.line.tgt_valid = 1'b1;
                s.line.tgt_addr  = i.addr;
              end
            end
            if (i.cls == I_JMP) begin close = 1'b1; why = 2'd1; end
            else if (s.line.path[s.cur].n_instr == 2'd3) begin close = 1'b1; why = 2'd3; end
          end
        end
      end
    end
    if (!en) s.busy = 1'b0;
    nx = s;
    fin_branch = cb; fin_indirect = ci; fin_full = cf; fin_other = co;
  end

  // --- state and write queue
  logic [$clog2(WR_FIFO+1)-1:0] room;
  assign room     = $bits(room)'(WR_FIFO) - fcount;
  assign wr_valid = fcount != 0;
  assign wr_entry = fifo[fhead].entry;
  assign wr_line  = fifo[fhead].line;
  assign drop     = int'(nfin) > int'(room) + int'(wr_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= '0;
      fhead  <= '0;
      fcount <= '0;
    end else begin
      int unsigned n_in;
      st   <= nx;
      n_in = (int'(nfin) > int'(room) + int'(wr_valid)) ? int'(room) + int'(wr_valid) : int'(nfin);
      fhead  <= wr_valid ? $bits(fhead)'((int'(fhead) + 1) % WR_FIFO) : fhead;
      fcount <= $bits(fcount)'(int'(fcount) + int'(n_in) - int'(wr_valid));
    end
  end

  always_ff @(posedge clk) begin
    int unsigned n_in;
    n_in = (int'(nfin) > int'(room) + int'(wr_valid)) ? int'(room) + int'(wr_valid) : int'(nfin);
    for (int k = 0; k < 4; k++)
      if (k < int'(n_in))
        fifo[(int'(fhead) + int'(fcount) + k) % WR_FIFO] <= fin[k];
  end
endmodule
