// fu_pkg: types and constants shared by the fill-unit decoding front end.
//
// The front end handles x86 instructions that arrive already split into
// fields (class, registers, length, branch target); byte-level x86 parsing is
// outside this design. Each instruction becomes a group of microoperations that
// fits the seven-slot resource template (one address generation, two loads,
// three computations and one store), with up to three microarchitected
// registers MR1-MR3 carrying values between the microoperations of one
// instruction. A tree-like decoded-cache line holds two paths of up to three
// instructions (21 microoperations) each, split at one conditional branch.
//
// Template sizes, the three-instruction line, the 21-microoperation path and
// the 512-entry fill unit register file (5-bit line counter, 4-bit register
// number) follow the document. Bit widths of registers, the operation field
// and the encodings are this design's own choices.
package fu_pkg;

  localparam int unsigned ADDR_W     = 32;  // instruction address width
  localparam int unsigned TPL_UOPS   = 7;   // microoperations per template
  localparam int unsigned LINE_INSTR = 3;   // instructions per line path
  localparam int unsigned LINE_UOPS  = TPL_UOPS * LINE_INSTR;  // 21
  localparam int unsigned MR_PER_INSTR = 3; // MR1..MR3
  localparam int unsigned LINE_CTR_W = 5;   // line access counter bits
  localparam int unsigned FU_IDX_W   = 4;   // MR number within a line
  localparam int unsigned FU_NAME_W  = LINE_CTR_W + FU_IDX_W;  // 9 -> 512

  typedef logic [ADDR_W-1:0] addr_t;

  // Logical register number used inside microoperations.
  //   0..7   : EAX ECX EDX EBX ESP EBP ESI EDI (x86 encoding order)
  //   16..31 : microarchitected register; low 4 bits are its number
  //            (0..2 from the decoders, 0..8 inside a filled line)
  //   8      : no register
  typedef logic [4:0] reg_t;
  localparam reg_t R_EAX = 5'd0, R_ECX = 5'd1, R_EDX = 5'd2, R_EBX = 5'd3,
                   R_ESP = 5'd4, R_EBP = 5'd5, R_ESI = 5'd6, R_EDI = 5'd7;
  localparam reg_t R_NONE = 5'd8;
  localparam reg_t R_MR1 = 5'd16, R_MR2 = 5'd17, R_MR3 = 5'd18;

  function automatic logic is_mr(reg_t r);
    return r[4];
  endfunction

  // Instruction classes. RR* are register-to-register (simple); the others
  // follow the appendix mappings.
  typedef enum logic [4:0] {
    I_NOP, I_ALU_RR, I_ALU_RI, I_ALU_MR, I_ALU_RM, I_ADC_MR, I_ADC_RM,
    I_MUL_RM, I_DIV_RM, I_MOV_LD, I_MOV_ST, I_PUSH_REG, I_PUSH_MEM,
    I_POP_REG, I_POP_MEM, I_LODS, I_STOS, I_MOVS, I_CMPS,
    I_JCC, I_JMP, I_JIND
  } iclass_e;

  typedef struct packed {
    addr_t      addr;     // address of the instruction
    logic [3:0] len;      // length in bytes (1..15)
    iclass_e    cls;
    logic [2:0] func;     // ALU function for computation microoperations
    reg_t       base;     // address base register
    reg_t       index;    // address index register
    reg_t       src1;     // register operand
    reg_t       src2;     // second source (divide) or second destination
    logic [3:0] cond;     // branch condition
    addr_t      target;   // direct branch target
    logic       taken;    // resolved direction of a conditional branch
  } instr_t;

  typedef enum logic [2:0] {U_NONE, U_A, U_L, U_C, U_S, U_B} ukind_e;

  typedef struct packed {
    ukind_e     kind;
    logic [2:0] func;
    reg_t       dst;     // first destination (or store data source: none)
    reg_t       dst2;    // second destination (multiply)
    logic       wflags;  // writes the flags register
    reg_t       srca;    // address / first source
    reg_t       srcb;    // second source (store data)
    reg_t       srcc;    // third source (divide dividend high part)
    logic       rflags;  // reads the flags register
  } uop_t;

  // Decoded instruction: one template-shaped group of microoperations.
  typedef struct packed {
    instr_t                    ins;
    logic [2:0]                n_uops;   // 0..7
    uop_t [TPL_UOPS-1:0]       uops;
  } dgroup_t;

  // One path of a tree-like line.
  typedef struct packed {
    logic                      open;     // may still be extended by filling
    logic [1:0]                n_instr;  // instructions on this path
    logic [4:0]                n_uops;   // microoperations on this path
    addr_t                     next;     // next-instruction address
    uop_t [LINE_UOPS-1:0]      uops;
  } lpath_t;

  // Tree-like line: path 0 = branch untaken, path 1 = branch taken. Both
  // paths hold the same microoperations up to the branch.
  typedef struct packed {
    logic       has_br;     // line holds a conditional branch
    logic [1:0] br_pos;     // instruction index of the branch on both paths
    logic [3:0] br_cond;    // condition field
    addr_t      br_iaddr;   // address of the branch instruction
    addr_t      br_addr;    // branch-taken address
    logic       tgt_valid;  // instructions from the target are in the line
    addr_t      tgt_addr;   // second tag: address of the target instructions
    lpath_t [1:0] path;
  } dline_t;

  // Operand after fill unit renaming: fu=1 means idx is a fill unit register
  // name, otherwise idx[4:0] is a reg_t still to be renamed.
  typedef struct packed {
    logic       fu;
    logic [FU_NAME_W-1:0] idx;
  } xreg_t;

  typedef struct packed {
    ukind_e     kind;
    logic [2:0] func;
    xreg_t      dst;
    xreg_t      dst2;
    logic       wflags;
    xreg_t      srca;
    xreg_t      srcb;
    xreg_t      srcc;
    logic       rflags;
  } xuop_t;

  // Operand after general renaming.
  typedef enum logic [1:0] {O_NONE, O_ARCH, O_ROB, O_FU} okind_e;
  typedef struct packed {
    okind_e               kind;
    logic [FU_NAME_W-1:0] idx;   // arch reg, {sub,ROB slot} or fill unit reg
  } opnd_t;

  typedef struct packed {
    ukind_e     kind;
    logic [2:0] func;
    opnd_t      dst;
    opnd_t      dst2;
    opnd_t      fdst;     // flags destination
    opnd_t      srca;
    opnd_t      srcb;
    opnd_t      srcc;
    opnd_t      fsrc;     // flags source
  } ruop_t;

  function automatic xreg_t to_x(reg_t r);
    return '{fu: 1'b0, idx: FU_NAME_W'(r)};
  endfunction

  function automatic xuop_t to_xuop(uop_t u);
    xuop_t x;
    x.kind = u.kind;   x.func = u.func;
    x.dst  = to_x(u.dst);  x.dst2 = to_x(u.dst2); x.wflags = u.wflags;
    x.srca = to_x(u.srca); x.srcb = to_x(u.srcb);
    x.srcc = to_x(u.srcc); x.rflags = u.rflags;
    return x;
  endfunction

  localparam uop_t UOP_NONE = '{kind: U_NONE, func: 3'd0, dst: R_NONE, dst2: R_NONE,
                                wflags: 1'b0, srca: R_NONE, srcb: R_NONE,
                                srcc: R_NONE, rflags: 1'b0};

  localparam logic [2:0] F_STEP = 3'd7;  // pointer step (push/pop/string)

  function automatic uop_t mk_uop(ukind_e k, logic [2:0] f, reg_t d, reg_t d2,
                                  logic wf, reg_t a, reg_t b, reg_t c, logic rf);
    uop_t u;
    u.kind = k; u.func = f; u.dst = d; u.dst2 = d2; u.wflags = wf;
    u.srca = a; u.srcb = b; u.srcc = c; u.rflags = rf;
    return u;
  endfunction

  function automatic logic is_simple_class(iclass_e c);
    return c inside {I_NOP, I_ALU_RR, I_ALU_RI, I_JCC, I_JMP};
  endfunction

endpackage
