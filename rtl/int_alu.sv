// int_alu: integer ALU of one functional-unit lane (execute stage).
//
// Computes add, subtract, and, or, xor, shifts, signed set-less-than and
// immediate pass-through, and for branches the condition and the target
// (pc + offset). The second operand is the immediate when the instruction has
// no second source register. Purely combinational; the lane registers the
// result at the end of the execute stage. The operation set is this design's
// own encoding (see smt_pkg).
module int_alu
  import smt_pkg::*;
(
  input  alu_op_e op,
  input  logic    use_imm,
  input  word_t   a,
  input  word_t   b,
  input  word_t   imm,
  input  word_t   pc,
  output word_t   result,
  output logic    taken,
  output word_t   target
);

  word_t bb;
  assign bb     = use_imm ? imm : b;
  assign target = pc + imm;

  always_comb begin
    result = '0;
    taken  = 1'b0;
    case (op)
      A_ADD:   result = a + bb;
      A_SUB:   result = a - bb;
      A_AND:   result = a & bb;
      A_OR:    result = a | bb;
      A_XOR:   result = a ^ bb;
      A_SLL:   result = a << bb[4:0];
      A_SRL:   result = a >> bb[4:0];
      A_SLT:   result = word_t'($signed(a) < $signed(bb));
      A_PASSB: result = bb;
      A_BEQ:   taken  = a == b;
      A_BNE:   taken  = a != b;
      A_JMP:   taken  = 1'b1;
      default: ;
    endcase
  end

endmodule
