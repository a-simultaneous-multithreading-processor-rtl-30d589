// tb_decode_unit: random instruction groups at the head of the fetch queue,
// some squashed, with random issue-queue free space. Checks how many entries
// are taken, which are inserted, and for each inserted instruction the
// functional-unit class, registers, immediate and flags against a decoding
// table written out in this testbench.
module tb_decode_unit;
  import smt_pkg::*;
  localparam int T = 4, N = 4, L = 16;
  logic [N-1:0] fq_occ, fq_valid;
  fetch_entry_t [N-1:0] fq_entry;
  logic [$clog2(L+1)-1:0] iq_free;
  logic [T-1:0] flush;
  logic [$clog2(N+1)-1:0] rd_n;
  logic [N-1:0] ins_valid;
  uop_t [N-1:0] ins_uop;
  int checks = 0, failures = 0;

  decode_unit #(.T(T), .N(N), .L(L)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [5:0] ops [19] = '{6'h00,6'h01,6'h02,6'h03,6'h04,6'h05,6'h06,6'h07,6'h08,6'h09,
                            6'h0A,6'h0B,6'h0C,6'h0D,6'h0E,6'h0F,6'h10,6'h11,6'h2A};
    for (int it = 0; it < 3000; it++) begin
      automatic int nocc = $urandom % (N + 1);
      automatic int used = 0, exp_n = 0;
      automatic bit stop = 0;
      automatic logic [N-1:0] exp_ins = '0;
      for (int i = 0; i < N; i++) begin
        fq_occ[i]   = i < nocc;
        fq_valid[i] = fq_occ[i] && ($urandom % 5 != 0);
        fq_entry[i] = '{tid: TIDW'($urandom % T), pc: $urandom & ~32'd3,
                        instr: {ops[$urandom % 19], 26'($urandom)}, pred_npc: $urandom};
      end
      iq_free = ($clog2(L+1))'($urandom % 6);
      flush   = ($urandom % 6 == 0) ? T'(1 << ($urandom % T)) : '0;
      for (int i = 0; i < N; i++)
        if (!stop && fq_occ[i]) begin
          if (!fq_valid[i]) exp_n++;
          else if (used < int'(iq_free)) begin
            used++; exp_n++; exp_ins[i] = !flush[fq_entry[i].tid];
          end else stop = 1;
        end
      #1;
      chk(int'(rd_n) == exp_n, $sformatf("rd_n %0d exp %0d", rd_n, exp_n));
      chk(ins_valid == exp_ins, "ins_valid");
      for (int i = 0; i < N; i++) if (exp_ins[i]) begin
        automatic word_t w = fq_entry[i].instr;
        automatic uop_t u = ins_uop[i];
        automatic logic [5:0] op = w[31:26];
        automatic word_t si = {{14{w[17]}}, w[17:0]};
        chk(u.tid == fq_entry[i].tid && u.pc == fq_entry[i].pc && u.pred_npc == fq_entry[i].pred_npc, "tag");
        case (op)
          6'h01,6'h02,6'h03,6'h04,6'h05,6'h06,6'h07,6'h08,6'h0B:
            chk(u.rd_we && u.rd == w[25:22] && u.rs1_used && u.rs1 == w[21:18] && u.rs2_used && u.rs2 == w[17:14]
                && u.fu == ((op == 6'h0B) ? FU_MUL : FU_ALU), "R-type");
          6'h09: chk(u.rd_we && u.rd == w[25:22] && u.rs1 == w[21:18] && !u.rs2_used && u.imm == si && u.fu == FU_ALU, "ADDI");
          6'h0A: chk(u.rd_we && !u.rs1_used && u.imm == {w[17:0], 14'd0}, "LUI");
          6'h0C: chk(u.is_load && u.fu == FU_LSU && u.rd_we && u.rd == w[25:22] && u.rs1 == w[21:18] && u.imm == si, "LD");
          6'h0D: chk(u.is_store && u.fu == FU_LSU && !u.rd_we && u.rs1 == w[21:18] && u.rs2 == w[25:22] && u.rs2_used, "ST");
          6'h0E,6'h0F: chk(u.is_branch && !u.rd_we && u.rs1 == w[25:22] && u.rs2 == w[21:18] && u.imm == si << 2, "Bcc");
          6'h10: chk(u.is_branch && !u.rs1_used && !u.rs2_used && u.imm == si << 2, "JMP");
          6'h11: chk(u.is_halt && !u.rd_we, "HALT");
          6'h00: chk(!u.rd_we && !u.illegal && !u.is_branch && !u.is_load && !u.is_store, "NOP");
          default: chk(u.illegal && !u.rd_we, "undefined");
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
