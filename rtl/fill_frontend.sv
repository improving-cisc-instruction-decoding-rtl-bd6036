// fill_frontend: x86 decoding front end with a fill unit and a decoded
// instruction cache holding tree-like lines.
//
// Each cycle the address of the oldest queued instruction is looked up in
// the decoded instruction cache. On a hit, the branch prediction cache picks
// one of the line's two paths (untaken/taken); that path's microoperations
// get fill unit register names (fu_rename) and go to general renaming, and
// the instructions they stand for leave the queue without being decoded: up
// to three instructions and 21 microoperations per cycle. On a miss the
// P6-style decoder (one complex, two simple decoders) decodes up to three
// instructions from the queue; its microoperations go to renaming and to the
// fill unit, which packs them into lines for the cache. The mux between the
// two sources is steered by the hit signal.
//
// Branch outcomes: the instruction stream is supplied in execution order
// with each conditional branch's resolved direction (taken bit); the
// microengine that would resolve branches is outside this design. When the
// chosen path disagrees with that direction, the cycle supplies nothing
// (the wrong microoperations are squashed before renaming), the prediction
// cache is corrected and the line is looked up again the next cycle, now
// choosing the other path. If that path is still open, the fill unit backs up
// into the line and extends it with what is decoded next.
//
// Interface: push_n/push_data load the queue (at most q_space); fill_en
// enables filling; inv_valid/inv_addr start a self-modifying-code range
// invalidation; retire_n frees reorder-buffer slots. Renamed microoperations
// leave on out_valid/out_n/out_uops one cycle after selection. The ev_* and
// statistics outputs report, per cycle, what happened. The fill unit
// register file (512 words) and the physical register file (one word per
// {sub, slot} name) sit beside the renamers; their ports belong to the
// microengine and are brought out.
//
// The structure follows the document's fill unit figures; the trace-driven
// branch direction, one-cycle squash on a wrong path and all widths not
// named in the document are this design's own choices.
module fill_frontend
  import fu_pkg::*;
#(
  parameter int unsigned DIC_ENTRIES = 1024,
  parameter int unsigned DIC_WAYS    = 4,
  parameter int unsigned BPC_ENTRIES = 512,
  parameter int unsigned IQ_DEPTH    = 8,
  parameter int unsigned ROB_N       = 64,
  localparam int unsigned PRF_AW     = 2 + $clog2(ROB_N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  fill_en,
  // instruction supply
  input  logic [1:0]            push_n,
  input  instr_t [2:0]          push_data,
  output logic [$clog2(IQ_DEPTH+1)-1:0] q_space,
  // self-modifying code
  input  logic                  inv_valid,
  input  addr_t                 inv_addr,
  // microengine retirement
  input  logic [$clog2(ROB_N+1)-1:0] retire_n,
  // renamed microoperations
  output logic                  out_valid,
  output logic [4:0]            out_n,
  output ruop_t [LINE_UOPS-1:0] out_uops,
  // per-cycle events and statistics
  output logic                  ev_hit,        // line supplied from the cache
  output logic                  ev_mispredict, // wrong path chosen, squashed
  output logic                  ev_stall,      // renaming not ready
  output logic                  ev_cplx_wait,  // complex instr. in slot 2/3
  output logic [1:0]            n_instr,       // instructions delivered
  output logic [1:0]            n_decoded,     // of which decoded
  output logic                  ev_reopen,
  output logic                  ev_drop,
  output logic                  ev_line_write,
  output logic [1:0]            fin_branch,
  output logic [1:0]            fin_indirect,
  output logic [1:0]            fin_full,
  output logic [1:0]            fin_other,
  output logic                  inv_busy,
  output logic [$clog2(DIC_ENTRIES+1)-1:0] inv_kill,
  output logic [6:0]            gen_renames,
  output logic [6:0]            fu_refs,
  output logic [LINE_CTR_W-1:0] line_ctr,
  // microengine side of the fill unit register file
  input  logic [2:0][FU_NAME_W-1:0] fu_raddr,
  output logic [2:0][31:0]          fu_rdata,
  input  logic [2:0]                fu_we,
  input  logic [2:0][FU_NAME_W-1:0] fu_waddr,
  input  logic [2:0][31:0]          fu_wdata,
  // microengine side of the physical register file ({sub, slot} names)
  input  logic [2:0][PRF_AW-1:0]    pr_raddr,
  output logic [2:0][31:0]          pr_rdata,
  input  logic [2:0]                pr_we,
  input  logic [2:0][PRF_AW-1:0]    pr_waddr,
  input  logic [2:0][31:0]          pr_wdata
);
  // ---- instruction queue (decode slots 1..3)
  instr_t [2:0] slot;
  logic [$clog2(IQ_DEPTH+1)-1:0] q_count;
  logic [1:0] pop_n;

  instr_queue #(.DEPTH(IQ_DEPTH), .PUSH_W(3)) u_iq (
    .clk, .rst_n, .push_n, .push_data, .pop_n, .slot, .count(q_count), .space(q_space)
  );

  // ---- decoded instruction cache lookup
  logic   hit;
  logic [$clog2(DIC_WAYS)-1:0] hit_way;
  dline_t line;
  logic   wr_valid;
  addr_t  wr_entry;
  dline_t wr_line;

  decoded_icache #(.ENTRIES(DIC_ENTRIES), .WAYS(DIC_WAYS)) u_dic (
    .clk, .rst_n, .lk_addr(slot[0].addr), .hit, .hit_way, .hit_line(line),
    .wr_valid, .wr_entry, .wr_line, .inv_valid, .inv_addr, .inv_busy, .inv_kill
  );

  // ---- path choice
  logic pred, pred_hit, upd_valid, actual;
  branch_pred_cache #(.ENTRIES(BPC_ENTRIES)) u_bpc (
    .clk, .rst_n, .lk_addr(line.br_iaddr), .lk_target(line.br_addr), .pred, .pred_hit,
    .upd_valid, .upd_addr(line.br_iaddr), .upd_taken(actual)
  );

  logic   psel, hit_ok, supply, mispred, ready, dec_en;
  lpath_t path;
  assign psel    = line.has_br & pred;
  assign path    = line.path[psel];
  assign hit_ok  = hit && path.n_instr != 2'd0 && 32'(q_count) >= 32'(path.n_instr);
  assign actual  = slot[line.br_pos].taken;
  assign mispred = line.has_br && (actual != psel);
  assign supply  = hit_ok && ready && !mispred;
  assign dec_en  = ready && !hit_ok;
  assign upd_valid = hit_ok && ready && line.has_br;

  // ---- decoders
  dgroup_t [2:0] dgrp;
  logic [1:0]    n_dec;
  logic          cplx_wait;
  p6_decoder u_dec (
    .en(dec_en), .slot, .count(4'(q_count)), .grp(dgrp), .n_dec, .cplx_wait
  );

  assign pop_n = supply ? path.n_instr : n_dec;

  // ---- fill unit
  fill_unit u_fill (
    .clk, .rst_n, .en(fill_en),
    .dec_n(n_dec), .dec_grp(dgrp),
    .hit_valid(supply), .hit_entry(slot[0].addr), .hit_path(psel), .hit_line(line),
    .wr_valid, .wr_entry, .wr_line,
    .fin_branch, .fin_indirect, .fin_full, .fin_other, .reopen(ev_reopen), .drop(ev_drop)
  );

  // ---- fill unit renaming and source mux
  xuop_t [LINE_UOPS-1:0] fr_uops, mx_uops;
  logic [5:0] fu_rd, fu_wr;
  logic [4:0] mx_n;
  fu_rename u_frn (
    .clk, .rst_n, .take(supply), .n_uops(path.n_uops), .in_uops(path.uops),
    .out_uops(fr_uops), .ctr(line_ctr), .fu_reads(fu_rd), .fu_writes(fu_wr)
  );

  uop_mux u_mux (
    .sel_dic(supply), .dic_n(path.n_uops), .dic_uops(fr_uops),
    .n_dec, .dec_grp(dgrp), .out_n(mx_n), .out_uops(mx_uops)
  );

  // ---- general renaming
  logic [$clog2(ROB_N+1)-1:0] rob_count;
  gen_rename #(.ROB_N(ROB_N)) u_ren (
    .clk, .rst_n, .in_valid(supply || n_dec != 2'd0), .in_n(mx_n), .in_uops(mx_uops),
    .ready, .retire_n, .out_valid, .out_n, .out_uops, .gen_renames, .fu_refs, .rob_count
  );

  // ---- register files read and written by the microengine
  regfile #(.DEPTH(1 << FU_NAME_W), .WIDTH(32), .NRD(3), .NWR(3)) u_fu_rf (
    .clk, .raddr(fu_raddr), .rdata(fu_rdata), .we(fu_we), .waddr(fu_waddr), .wdata(fu_wdata)
  );
  regfile #(.DEPTH(1 << PRF_AW), .WIDTH(32), .NRD(3), .NWR(3)) u_phys_rf (
    .clk, .raddr(pr_raddr), .rdata(pr_rdata), .we(pr_we), .waddr(pr_waddr), .wdata(pr_wdata)
  );

  assign ev_hit        = supply;
  assign ev_mispredict = hit_ok && ready && mispred;
  assign ev_stall      = !ready && q_count != 0;
  assign ev_cplx_wait  = cplx_wait;
  assign n_instr       = pop_n;
  assign n_decoded     = n_dec;
  assign ev_line_write = wr_valid;
endmodule
