// xmt_tcu: a thread control unit, the hardware context that runs one thread.
//
// Each TCU fetches from the cluster's instruction cache, decodes, reads its
// operands and sends the instruction to one of the functional units that the
// cluster's TCUs share. Threads are independent by construction, so the TCU
// never checks dependences against other TCUs. This implementation keeps one
// instruction of its thread in flight: FETCH (instruction cache hit), DECODE
// (register read, address generation), ISSUE (held until the cluster grants a
// unit of the needed class), WAIT (result, write-back, next pc). A branch is
// resolved by a branch unit before the next fetch, i.e. the TCU stalls on
// every branch.
//
// Register names: $0..$31 are global (read from the cluster's copy kept by
// the interface unit; $0 reads zero); $32..$63 are the TCU's own local
// registers. A write to a global register is sent to the central management
// (cm_req RQ_GWR) and completes when its broadcast comes back (gwr_ack).
//
// XMT primitives:
//   ps rR,rB / psi rR,rB,imm : one-cycle cm_req RQ_PS to the prefix-sum
//     coordinator with base rB and increment bit 0 of rR (or of imm); waits for
//     ps_done and writes ps_value (the old base plus lower-ranked increments)
//     to rR.
//   spawn : (TCU 0, serial mode) cm_req RQ_SPAWN with the thread start pc;
//     TCU 0 remembers the pc after the spawn and waits.
//   spawn_go : every TCU starts its thread at spawn_pc in parallel mode.
//   join  : the TCU stops (joined = 1). TCU 0 waits for end_go and then
//     resumes serial code after its spawn.
//   halt  : (serial mode) stops TCU 0 for good; halted = 1.
// The one-instruction-at-a-time sequencing and the halt instruction are this
// design's own; fetch-to-issue in order, stall on branch and the spawn/join
// and prefix-sum behaviour follow the XMT description.
module xmt_tcu
  import xmt_pkg::*;
#(
  parameter int unsigned GID      = 0,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic      clk,
  input  logic      rst_n,
  // instruction cache port
  output logic      f_req,
  output word_t     f_pc,
  input  logic      f_hit,
  input  word_t     f_instr,
  // local registers (own bank)
  output logic [4:0] ra_idx,
  output logic [4:0] rb_idx,
  input  word_t     ra_data,
  input  word_t     rb_data,
  output logic      rf_we,
  output logic [4:0] rf_widx,
  output word_t     rf_wdata,
  // global register copy
  output greg_t     ga_idx,
  output greg_t     gb_idx,
  input  word_t     ga_data,
  input  word_t     gb_data,
  // functional-unit issue
  output logic      iss_valid,
  output fu_class_e iss_class,
  output alu_op_e   iss_op,
  output logic      iss_div,
  output logic      iss_we,
  output word_t     iss_a,
  output word_t     iss_b,
  input  logic      iss_gnt,
  input  logic      res_valid,
  input  word_t     res_data,
  // central management
  output cm_req_t   cm_req,
  input  logic      ps_done,
  input  word_t     ps_value,
  input  logic      gwr_ack,
  input  logic      spawn_go,
  input  word_t     spawn_pc,
  input  logic      end_go,
  // status
  output logic      joined,
  output logic      halted,
  output logic      retire
);
  typedef enum logic [3:0] {
    T_IDLE, T_FETCH, T_DECODE, T_DECODE2, T_ISSUE, T_WAIT_FU,
    T_WAIT_PS, T_WAIT_GWR, T_WAIT_SPAWN, T_WAIT_END, T_HALTED
  } tcu_state_e;

  tcu_state_e state;
  word_t      pc, resume_pc, instr;
  logic       par;                       // running a thread of a spawn
  word_t      opa, opb;
  fu_class_e  cls;
  alu_op_e    aop;
  logic       is_div, is_st;

  // instruction fields
  opcode_e     op;
  reg_t        f_rd, f_rs, f_rt;
  logic [13:0] imm14;
  logic [7:0]  c8;
  funct_e      funct;
  assign op    = opcode_e'(instr[31:26]);
  assign f_rd  = instr[25:20];
  assign f_rs  = instr[19:14];
  assign f_rt  = instr[13:8];
  assign imm14 = instr[13:0];
  assign c8    = instr[7:0];
  assign funct = funct_e'(instr[5:0]);

  word_t pc4, br_target;
  assign pc4       = pc + 32'd4;
  assign br_target = pc4 + (sext14(imm14) << 2);

  // operand ports: name A and name B, each local or global
  reg_t  name_a, name_b;
  word_t val_a, val_b;
  always_comb begin
    name_a = f_rs;
    name_b = f_rt;
    unique case (op)
      OP_BEQ, OP_BNE: begin name_a = f_rd; name_b = f_rs; end
      OP_SW:          begin name_a = f_rs; name_b = f_rd; end
      OP_PS:          begin name_a = f_rd; name_b = f_rs; end
      default: ;
    endcase
    if (state == T_DECODE2) name_a = f_rd;      // store data of swa
  end
  assign ra_idx = name_a[4:0];
  assign rb_idx = name_b[4:0];
  assign ga_idx = name_a[4:0];
  assign gb_idx = name_b[4:0];
  assign val_a  = name_a[5] ? ra_data : ga_data;
  assign val_b  = name_b[5] ? rb_data : gb_data;

  // write-back: local now, global through the central management
  reg_t  wb_name;
  word_t wb_val;
  logic  wb_en;
  always_comb begin
    wb_en   = 1'b0;
    wb_name = f_rd;
    wb_val  = '0;
    if (state == T_WAIT_FU && res_valid && cls != FU_BR && !is_st) begin
      wb_en  = 1'b1;
      wb_val = res_data;
    end else if (state == T_WAIT_PS && ps_done) begin
      wb_en  = 1'b1;
      wb_val = ps_value;
    end
  end
  assign rf_we    = wb_en && wb_name[5];
  assign rf_widx  = wb_name[4:0];
  assign rf_wdata = wb_val;

  logic wb_global;
  assign wb_global = wb_en && !wb_name[5] && (wb_name != '0);

  assign f_req     = (state == T_FETCH);
  assign f_pc      = pc;
  assign iss_valid = (state == T_ISSUE);
  assign iss_class = cls;
  assign iss_op    = aop;
  assign iss_div   = is_div;
  assign iss_we    = is_st;
  assign iss_a     = opa;
  assign iss_b     = opb;

  assign joined = (state == T_IDLE) || (state == T_WAIT_END) || (state == T_HALTED);
  assign halted = (state == T_HALTED);

  always_comb begin
    cm_req = '0;
    if (wb_global) begin
      cm_req.kind = RQ_GWR;
      cm_req.greg = wb_name[4:0];
      cm_req.data = wb_val;
    end else if (state == T_DECODE) begin
      unique case (op)
        OP_SPAWN: begin cm_req.kind = RQ_SPAWN; cm_req.data = br_target; end
        OP_PS:    begin cm_req.kind = RQ_PS; cm_req.greg = f_rs[4:0]; cm_req.data = word_t'(val_a[0]); end
        OP_PSI:   begin cm_req.kind = RQ_PS; cm_req.greg = f_rs[4:0]; cm_req.data = word_t'(imm14[0]); end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= (GID == 0) ? T_FETCH : T_IDLE;
      pc        <= RESET_PC;
      resume_pc <= '0;
      instr     <= '0;
      par       <= 1'b0;
      opa       <= '0;
      opb       <= '0;
      cls       <= FU_ALU;
      aop       <= ALU_ADD;
      is_div    <= 1'b0;
      is_st     <= 1'b0;
      retire    <= 1'b0;
    end else begin
      retire <= 1'b0;
      unique case (state)
        T_IDLE: if (spawn_go) begin pc <= spawn_pc; par <= 1'b1; state <= T_FETCH; end

        T_FETCH: if (f_hit) begin instr <= f_instr; state <= T_DECODE; end

        T_DECODE: begin
          cls    <= FU_ALU;
          is_div <= 1'b0;
          is_st  <= 1'b0;
          opa    <= val_a;
          opb    <= val_b;
          state  <= T_ISSUE;
          unique case (op)
            OP_R: begin
              unique case (funct)
                F_ADD:  aop <= ALU_ADD;
                F_SUB:  aop <= ALU_SUB;
                F_AND:  aop <= ALU_AND;
                F_OR:   aop <= ALU_OR;
                F_XOR:  aop <= ALU_XOR;
                F_NOR:  aop <= ALU_NOR;
                F_SLT:  aop <= ALU_SLT;
                F_SLTU: aop <= ALU_SLTU;
                F_SLL:  aop <= ALU_SLL;
                F_SRL:  aop <= ALU_SRL;
                F_MUL:  cls <= FU_MD;
                F_DIVU: begin cls <= FU_MD; is_div <= 1'b1; end
                default: begin pc <= pc4; retire <= 1'b1; state <= T_FETCH; end
              endcase
            end
            OP_ADDI: begin aop <= ALU_ADD;  opb <= sext14(imm14); end
            OP_SLTI: begin aop <= ALU_SLT;  opb <= sext14(imm14); end
            OP_ANDI: begin aop <= ALU_AND;  opb <= word_t'(imm14); end
            OP_ORI:  begin aop <= ALU_OR;   opb <= word_t'(imm14); end
            OP_LUI:  begin aop <= ALU_LUI;  opb <= word_t'(imm14); end
            OP_BEQ:  begin cls <= FU_BR; aop <= ALU_EQ; end
            OP_BNE:  begin cls <= FU_BR; aop <= ALU_NE; end
            OP_LW:   begin cls <= FU_MEM; opa <= val_a + (sext14(imm14) << 2); end
            OP_SW:   begin cls <= FU_MEM; is_st <= 1'b1; opa <= val_a + (sext14(imm14) << 2); end
            OP_LWA:  begin cls <= FU_MEM; opa <= val_a + (val_b << 2) + (sext8(c8) << 2); end
            OP_SWA:  begin
              cls   <= FU_MEM; is_st <= 1'b1;
              opa   <= val_a + (val_b << 2) + (sext8(c8) << 2);
              state <= T_DECODE2;
            end
            OP_J:     begin pc <= {pc4[31:28], instr[25:0], 2'b00}; retire <= 1'b1; state <= T_FETCH; end
            OP_JOIN:  begin
              retire <= 1'b1;
              if (!par)          begin pc <= pc4; state <= T_FETCH; end
              else if (GID == 0) state <= T_WAIT_END;
              else               begin par <= 1'b0; state <= T_IDLE; end
            end
            OP_HALT:  begin retire <= 1'b1; state <= T_HALTED; end
            OP_SPAWN: begin resume_pc <= pc4; retire <= 1'b1; state <= T_WAIT_SPAWN; end
            OP_PS, OP_PSI: state <= T_WAIT_PS;
            default:  begin pc <= pc4; retire <= 1'b1; state <= T_FETCH; end
          endcase
        end

        T_DECODE2: begin opb <= val_a; state <= T_ISSUE; end

        T_ISSUE: if (iss_gnt) state <= T_WAIT_FU;

        T_WAIT_FU: if (res_valid) begin
          retire <= 1'b1;
          pc     <= (cls == FU_BR && res_data[0]) ? br_target : pc4;
          state  <= wb_global ? T_WAIT_GWR : T_FETCH;
        end

        T_WAIT_PS: if (ps_done) begin
          retire <= 1'b1;
          pc     <= pc4;
          state  <= wb_global ? T_WAIT_GWR : T_FETCH;
        end

        T_WAIT_GWR: if (gwr_ack) state <= T_FETCH;

        T_WAIT_SPAWN: if (spawn_go) begin pc <= spawn_pc; par <= 1'b1; state <= T_FETCH; end

        T_WAIT_END: if (end_go) begin pc <= resume_pc; par <= 1'b0; state <= T_FETCH; end

        T_HALTED: ;

        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
