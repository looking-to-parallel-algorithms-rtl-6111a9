// xmt_pkg: instruction set, message formats and shared constants of the
// explicit multi-threading (XMT) processor.
//
// The instruction set is a MIPS-like 32-bit encoding with 6-bit register
// specifiers, so that one architectural register file of 64 names splits into
// a lower "global" half ($0..$31, g0..g31, shared by all threads) and an upper
// "local" half ($32..$63, t0..t31, private to each thread control unit). $0 is
// hard-wired to zero. On top of the base set come the XMT primitives spawn,
// join, ps (prefix-sum against a global register) and psi (its immediate form),
// and the scaled-index memory operations lwa/swa. The exact bit layout is this
// design's own; the split of the register names and the semantics of the
// primitives follow the XMT description.
//
// Layouts (bit 31 on the left):
//   R  : op[31:26]=OP_R  rd[25:20] rs[19:14] rt[13:8] 00 funct[5:0]
//   I  : op[31:26]       rd[25:20] rs[19:14] imm14[13:0]     (rd is the target,
//        or the first compared / stored register for beq, bne, sw)
//   LA : op[31:26]       rT[25:20] rB[19:14] rI[13:8] c8[7:0]
//        address = rB + (rI << 2) + (sign-extended c8 << 2)
//   J  : op[31:26]       target26[25:0] (word address)
//   spawn : imm14 is the word offset of the thread start from pc+4; rd and rs
//        may carry the spawn size register and first id for the assembler, the
//        hardware ignores them (threads draw their ids by prefix-sum).
//   ps  rR, rB : rd = rR, rs = rB (global).   psi rR, rB, imm : imm14 = imm.
package xmt_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned NREG     = 64;   // architectural register names
  localparam int unsigned NGREG    = 32;   // lower half: global registers
  localparam int unsigned NLREG    = 32;   // upper half: local per TCU
  localparam int unsigned LINE_W   = 4;    // words per cache line

  typedef logic [XLEN-1:0] word_t;
  typedef logic [5:0]      reg_t;
  typedef logic [4:0]      greg_t;

  typedef enum logic [5:0] {
    OP_R     = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_SLTI  = 6'h0A,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_LUI   = 6'h0F,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B,
    OP_LWA   = 6'h30,
    OP_SWA   = 6'h31,
    OP_SPAWN = 6'h38,
    OP_JOIN  = 6'h39,
    OP_PS    = 6'h3A,
    OP_PSI   = 6'h3B,
    OP_HALT  = 6'h3F
  } opcode_e;

  typedef enum logic [5:0] {
    F_SLL  = 6'h04,
    F_SRL  = 6'h06,
    F_MUL  = 6'h18,
    F_DIVU = 6'h1B,
    F_ADD  = 6'h20,
    F_SUB  = 6'h22,
    F_AND  = 6'h24,
    F_OR   = 6'h25,
    F_XOR  = 6'h26,
    F_NOR  = 6'h27,
    F_SLT  = 6'h2A,
    F_SLTU = 6'h2B
  } funct_e;

  // Operation performed by an ALU / branch unit.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_LUI, ALU_EQ, ALU_NE
  } alu_op_e;

  // Functional-unit classes shared by the TCUs of a cluster.
  typedef enum logic [1:0] { FU_ALU, FU_BR, FU_MD, FU_MEM } fu_class_e;

  // Request from a TCU to the central management, sent as a one-cycle pulse.
  typedef enum logic [1:0] { RQ_NONE, RQ_PS, RQ_GWR, RQ_SPAWN } req_kind_e;
  typedef struct packed {
    req_kind_e kind;
    greg_t     greg;   // prefix-sum base or written global register
    word_t     data;   // written value, spawn pc, or increment in bit 0
  } cm_req_t;

  // Message on the broadcast bus from the central management to all clusters.
  typedef enum logic [2:0] { MSG_NONE, MSG_GWR, MSG_PS, MSG_SPAWN, MSG_END } msg_kind_e;
  typedef struct packed {
    msg_kind_e   kind;
    greg_t       greg;   // written register / prefix-sum base
    word_t       data;   // written value / spawn pc
    logic [15:0] src;    // writing TCU for MSG_GWR
  } bcast_t;

  function automatic word_t sext14(input logic [13:0] v);
    return {{(XLEN-14){v[13]}}, v};
  endfunction

  function automatic word_t sext8(input logic [7:0] v);
    return {{(XLEN-8){v[7]}}, v};
  endfunction

  // Instruction builders used by test programs.
  function automatic word_t enc_r(input funct_e f, input int rd, input int rs, input int rt);
    return {OP_R, 6'(rd), 6'(rs), 6'(rt), 2'b00, f};
  endfunction
  function automatic word_t enc_i(input opcode_e op, input int rd, input int rs, input int imm);
    return {op, 6'(rd), 6'(rs), 14'(imm)};
  endfunction
  function automatic word_t enc_la(input opcode_e op, input int rt, input int rb, input int ri, input int c);
    return {op, 6'(rt), 6'(rb), 6'(ri), 8'(c)};
  endfunction
  function automatic word_t enc_j(input int target_word);
    return {OP_J, 26'(target_word)};
  endfunction

endpackage
