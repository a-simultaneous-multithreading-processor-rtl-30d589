// tb_int_alu: random operands for every ALU operation, with and without the
// immediate, compared with expressions written here; branch conditions and
// targets included.
module tb_int_alu;
  import smt_pkg::*;
  alu_op_e op; logic use_imm; word_t a, b, imm, pc, result, target; logic taken;
  int checks = 0, failures = 0;

  int_alu dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      automatic word_t e, bb;
      automatic logic et;
      op = alu_op_e'($urandom % 13);
      use_imm = $urandom % 2;
      a = $urandom; b = ($urandom % 4 == 0) ? a : $urandom; imm = $urandom; pc = $urandom;
      bb = use_imm ? imm : b;
      e = 0; et = 0;
      case (op)
        A_ADD: e = a + bb;
        A_SUB: e = a - bb;
        A_AND: e = a & bb;
        A_OR:  e = a | bb;
        A_XOR: e = a ^ bb;
        A_SLL: e = a << (bb % 32);
        A_SRL: e = a >> (bb % 32);
        A_SLT: e = (int'(a) < int'(bb)) ? 1 : 0;
        A_PASSB: e = bb;
        A_BEQ: et = (a == b);
        A_BNE: et = (a != b);
        A_JMP: et = 1;
        default: ;
      endcase
      #1;
      checks += 3;
      if (result != e) begin failures++; $display("FAIL %s %h %h -> %h exp %h", op.name(), a, bb, result, e); end
      if (taken != et) failures++;
      if (target != pc + imm) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
