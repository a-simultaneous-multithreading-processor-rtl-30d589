// smt_pkg: types and constants shared by the simultaneous multithreading core.
//
// The core issues and completes the instructions of each thread in order, while
// instructions of different threads share the fetch queue, the issue queue, the
// register-file ports and the functional units. Every instruction carries its
// thread identifier through the whole pipeline.
//
// Instruction encoding (this design's own; a small 32-bit RISC format stands in
// for the ARM instruction set the architecture was evaluated with):
//   [31:26] opcode  [25:22] ra  [21:18] rb  [17:14] rc  [17:0] imm18 (signed)
//   R-type   op ra, rb, rc      ra <- rb op rc        (ADD SUB AND OR XOR SLL SRL SLT MUL)
//   ADDI     ra <- rb + imm18
//   LUI      ra <- imm18 << 14
//   LD       ra <- mem[rb + imm18]
//   ST       mem[rb + imm18] <- ra
//   BEQ/BNE  if (ra ==/!= rb) pc <- pc + 4*imm18
//   JMP      pc <- pc + 4*imm18
//   HALT     the thread stops
//   any other opcode raises an undefined-instruction exception.
package smt_pkg;

  parameter int XLEN = 32;
  parameter int NREG = 16;
  parameter int RW   = $clog2(NREG);
  parameter int TIDW = 3;     // up to eight hardware threads

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RW-1:0]   reg_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00, OP_ADD = 6'h01, OP_SUB  = 6'h02, OP_AND = 6'h03,
    OP_OR   = 6'h04, OP_XOR = 6'h05, OP_SLL  = 6'h06, OP_SRL = 6'h07,
    OP_SLT  = 6'h08, OP_ADDI= 6'h09, OP_LUI  = 6'h0A, OP_MUL = 6'h0B,
    OP_LD   = 6'h0C, OP_ST  = 6'h0D, OP_BEQ  = 6'h0E, OP_BNE = 6'h0F,
    OP_JMP  = 6'h10, OP_HALT= 6'h11
  } opcode_e;

  // Functional-unit class chosen by the decoder.
  typedef enum logic [1:0] { FU_ALU = 2'd0, FU_MUL = 2'd1, FU_LSU = 2'd2 } fu_e;

  // Operation performed by an ALU.
  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_SLL, A_SRL, A_SLT, A_PASSB,
    A_BEQ, A_BNE, A_JMP, A_NONE
  } alu_op_e;

  // Instruction as fetched: raw bits with its thread, PC and predicted next PC.
  typedef struct packed {
    logic [TIDW-1:0] tid;
    word_t      pc;
    word_t      instr;
    word_t      pred_npc;
  } fetch_entry_t;

  // Decoded instruction as held in the issue queue and the functional-unit lanes.
  typedef struct packed {
    logic [TIDW-1:0] tid;
    word_t      pc;
    word_t      pred_npc;
    fu_e        fu;
    alu_op_e    alu_op;
    logic       is_load;
    logic       is_store;
    logic       is_branch;   // BEQ, BNE, JMP
    logic       is_halt;
    logic       illegal;     // undefined opcode: exception at the memory stage
    logic       rs1_used;
    logic       rs2_used;
    reg_t       rs1;
    reg_t       rs2;
    logic       rd_we;
    reg_t       rd;
    word_t      imm;
  } uop_t;

  // A result visible to the forwarding network or to the register-file write port.
  typedef struct packed {
    logic       valid;
    logic [TIDW-1:0] tid;
    reg_t       rd;
    word_t      data;
  } result_t;

  // Redirect request raised in the memory stage (mispredict, exception, halt).
  typedef struct packed {
    logic       valid;       // flush younger instructions of tid
    logic [TIDW-1:0] tid;
    word_t      npc;         // where the thread continues
    logic       halt;        // thread stops
    logic       exception;   // undefined instruction
    logic       mispredict;
    word_t      epc;         // PC of the excepting instruction
  } redirect_t;

  // Branch outcome used to train the predictor.
  typedef struct packed {
    logic       valid;
    logic [TIDW-1:0] tid;
    word_t      pc;
    logic       taken;
    word_t      target;
  } bp_update_t;

  // Instruction encoding helpers.
  function automatic word_t enc_r(opcode_e op, int ra, int rb, int rc);
    return {op, 4'(ra), 4'(rb), 4'(rc), 14'd0};
  endfunction
  function automatic word_t enc_i(opcode_e op, int ra, int rb, int imm);
    return {op, 4'(ra), 4'(rb), 18'(imm)};
  endfunction

endpackage
