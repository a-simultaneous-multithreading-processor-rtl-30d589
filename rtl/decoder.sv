// decoder: turns one fetched instruction into a decoded micro-operation.
//
// It decides which kind of functional unit executes the instruction (ALU,
// multiplier or load/store unit) and extracts the source registers, the
// destination register, the immediate and the operation, as the decode stage
// of the architecture does. The encoding itself is this design's own (see
// smt_pkg). Undefined opcodes are marked illegal and raise an exception when
// they reach the memory stage. Purely combinational.
module decoder
  import smt_pkg::*;
(
  input  fetch_entry_t fe,
  output uop_t         uop
);

  always_comb begin
    automatic logic [5:0] opc = fe.instr[31:26];
    automatic reg_t ra = fe.instr[25:22];
    automatic reg_t rb = fe.instr[21:18];
    automatic reg_t rc = fe.instr[17:14];
    automatic word_t simm = {{(XLEN-18){fe.instr[17]}}, fe.instr[17:0]};
    uop = '0;
    uop.tid      = fe.tid;
    uop.pc       = fe.pc;
    uop.pred_npc = fe.pred_npc;
    uop.fu       = FU_ALU;
    uop.alu_op   = A_NONE;
    uop.imm      = simm;
    case (opc)
      OP_NOP: ;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SLT, OP_MUL: begin
        uop.rs1 = rb; uop.rs1_used = 1'b1;
        uop.rs2 = rc; uop.rs2_used = 1'b1;
        uop.rd  = ra; uop.rd_we    = 1'b1;
        case (opc)
          OP_ADD: uop.alu_op = A_ADD;
          OP_SUB: uop.alu_op = A_SUB;
          OP_AND: uop.alu_op = A_AND;
          OP_OR:  uop.alu_op = A_OR;
          OP_XOR: uop.alu_op = A_XOR;
          OP_SLL: uop.alu_op = A_SLL;
          OP_SRL: uop.alu_op = A_SRL;
          OP_SLT: uop.alu_op = A_SLT;
          default: uop.fu    = FU_MUL;
        endcase
      end
      OP_ADDI: begin
        uop.rs1 = rb; uop.rs1_used = 1'b1;
        uop.rd  = ra; uop.rd_we    = 1'b1;
        uop.alu_op = A_ADD;
      end
      OP_LUI: begin
        uop.rd  = ra; uop.rd_we = 1'b1;
        uop.alu_op = A_PASSB;
        uop.imm = {fe.instr[17:0], 14'd0};
      end
      OP_LD: begin
        uop.fu = FU_LSU; uop.is_load = 1'b1;
        uop.rs1 = rb; uop.rs1_used = 1'b1;
        uop.rd  = ra; uop.rd_we    = 1'b1;
      end
      OP_ST: begin
        uop.fu = FU_LSU; uop.is_store = 1'b1;
        uop.rs1 = rb; uop.rs1_used = 1'b1;
        uop.rs2 = ra; uop.rs2_used = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        uop.is_branch = 1'b1;
        uop.rs1 = ra; uop.rs1_used = 1'b1;
        uop.rs2 = rb; uop.rs2_used = 1'b1;
        uop.alu_op = (opc == OP_BEQ) ? A_BEQ : A_BNE;
      end
      OP_JMP: begin
        uop.is_branch = 1'b1;
        uop.alu_op = A_JMP;
      end
      OP_HALT: uop.is_halt = 1'b1;
      default: uop.illegal = 1'b1;
    endcase
    if (uop.is_branch) uop.imm = {simm[XLEN-3:0], 2'b00};
  end

endmodule
