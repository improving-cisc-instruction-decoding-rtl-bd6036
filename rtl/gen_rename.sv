// gen_rename: general register renaming in front of the microengine.
//
// Renames, in program order within the cycle, every architected register
// (EAX..EDI and the flags) and every microarchitected register still carried
// by its logical number (MR1-MR3 from the decoders). Fill unit registers,
// already named by fu_rename, pass through untouched. Physical names are
// reorder-buffer based: the k-th microoperation accepted in a cycle takes the
// slot tail+k, and its destinations are named {sub, slot} with sub 0 for the
// first destination, 1 for the second and 2 for the flags. A register alias
// table remembers the latest writer of each logical register; a source reads
// that name while the writer's slot is still in the buffer, and the
// architected (retired) value otherwise: a mapping is dropped when the slot
// it names retires. Sources see the writers earlier in
// the same cycle, which is what preserves dependences inside a group.
//
// Handshake: in_valid with in_n microoperations is accepted when ready, which
// is high while at least LINE_UOPS slots are free. Results appear one cycle
// later on out_valid/out_n/out_uops. retire_n frees that many of the oldest
// slots at the clock edge. gen_renames and fu_refs count, per accepted
// cycle, the register references renamed here and the fill unit register
// references passed through.
//
// Sequential renaming of architected and microarchitected registers is from
// the document; a reorder buffer of about fifty entries is its example, and
// 64 slots is this design's choice, as are the naming scheme and handshake.
module gen_rename
  import fu_pkg::*;
#(
  parameter int unsigned ROB_N = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [4:0]            in_n,
  input  xuop_t [LINE_UOPS-1:0] in_uops,
  output logic                  ready,
  input  logic [$clog2(ROB_N+1)-1:0] retire_n,
  output logic                  out_valid,
  output logic [4:0]            out_n,
  output ruop_t [LINE_UOPS-1:0] out_uops,
  output logic [6:0]            gen_renames,
  output logic [6:0]            fu_refs,
  output logic [$clog2(ROB_N+1)-1:0] rob_count
);
  localparam int unsigned SW = $clog2(ROB_N);
  localparam int unsigned NL = 12;  // 8 GPR, flags, MR1..MR3
  localparam int unsigned L_FLAGS = 8;

  typedef struct packed {
    logic          valid;
    logic [1:0]    sub;
    logic [SW-1:0] slot;
  } rat_t;

  rat_t          rat [NL];
  logic [SW-1:0] head, tail;

  assign ready = (int'(rob_count) + LINE_UOPS) <= ROB_N;

  function automatic int unsigned lnum(logic [FU_NAME_W-1:0] r);
    return is_mr(r[4:0]) ? 9 + int'(r[1:0]) : int'(r[3:0]);
  endfunction

  rat_t                  rat_n [NL];
  ruop_t [LINE_UOPS-1:0] ren;
  logic [6:0]            cnt_g, cnt_f;
  logic                  acc;
  assign acc = in_valid && ready;

  always_comb begin
    rat_t r [NL];
    for (int l = 0; l < NL; l++) r[l] = rat[l];
    cnt_g = '0;
    cnt_f = '0;
    for (int k = 0; k < LINE_UOPS; k++) begin
      xuop_t u;
      logic [SW-1:0] slot;
      logic live;
      u    = in_uops[k];
      slot = SW'((int'(tail) + k) % ROB_N);
      ren[k] = '0;
      ren[k].kind = u.kind;
      ren[k].func = u.func;
      if (k < int'(in_n)) begin
        // sources
        for (int s = 0; s < 4; s++) begin
          xreg_t x;
          opnd_t o;
          int unsigned l;
          logic present;
          unique case (s)
            0: x = u.srca;
            1: x = u.srcb;
            2: x = u.srcc;
            default: x = '{fu: 1'b0, idx: u.rflags ? FU_NAME_W'(5'd31) : FU_NAME_W'(R_NONE)};
          endcase
          o = '0;
          present = x.fu || x.idx[4:0] != R_NONE;
          l = (s == 3) ? L_FLAGS : lnum(x.idx);
          if (x.fu) begin
            o = '{kind: O_FU, idx: x.idx};
            cnt_f = cnt_f + 7'd1;
          end else if (present) begin
            live = r[l].valid;
            if (live) o = '{kind: O_ROB, idx: {1'b0, r[l].sub, r[l].slot}};
            else      o = '{kind: O_ARCH, idx: FU_NAME_W'(l)};
            cnt_g = cnt_g + 7'd1;
          end
          unique case (s)
            0: ren[k].srca = o;
            1: ren[k].srcb = o;
            2: ren[k].srcc = o;
            default: ren[k].fsrc = o;
          endcase
        end
        // destinations
        for (int d = 0; d < 3; d++) begin
          xreg_t x;
          opnd_t o;
          int unsigned l;
          unique case (d)
            0: x = u.dst;
            1: x = u.dst2;
            default: x = '{fu: 1'b0, idx: u.wflags ? FU_NAME_W'(5'd31) : FU_NAME_W'(R_NONE)};
          endcase
          o = '0;
          l = (d == 2) ? L_FLAGS : lnum(x.idx);
          if (x.fu) begin
            o = '{kind: O_FU, idx: x.idx};
            cnt_f = cnt_f + 7'd1;
          end else if (x.idx[4:0] != R_NONE) begin
            r[l] = '{valid: 1'b1, sub: 2'(d), slot: slot};
            o = '{kind: O_ROB, idx: {1'b0, 2'(d), slot}};
            cnt_g = cnt_g + 7'd1;
          end
          unique case (d)
            0: ren[k].dst = o;
            1: ren[k].dst2 = o;
            default: ren[k].fdst = o;
          endcase
        end
      end
    end
    for (int l = 0; l < NL; l++) rat_n[l] = r[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NL; l++) rat[l] <= '0;
      head        <= '0;
      tail        <= '0;
      rob_count   <= '0;
      out_valid   <= 1'b0;
      out_n       <= '0;
      out_uops    <= '0;
      gen_renames <= '0;
      fu_refs     <= '0;
    end else begin
      int unsigned alloc, ret;
      alloc = acc ? int'(in_n) : 0;
      ret   = (int'(retire_n) > int'(rob_count)) ? int'(rob_count) : int'(retire_n);
      // a mapping dies when its writer retires
      for (int l = 0; l < NL; l++) begin
        rat_t e;
        e = acc ? rat_n[l] : rat[l];
        if (e.valid && ((int'(e.slot) - int'(head) + ROB_N) % ROB_N) < ret) e.valid = 1'b0;
        rat[l] <= e;
      end
      tail      <= SW'((int'(tail) + alloc) % ROB_N);
      head      <= SW'((int'(head) + ret) % ROB_N);
      rob_count <= $bits(rob_count)'(int'(rob_count) + alloc - ret);
      out_valid <= acc && in_n != 0;
      out_n     <= acc ? in_n : 5'd0;
      out_uops  <= ren;
      gen_renames <= acc ? cnt_g : 7'd0;
      fu_refs     <= acc ? cnt_f : 7'd0;
    end
  end
endmodule
