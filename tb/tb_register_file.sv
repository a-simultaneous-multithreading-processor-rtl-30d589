// tb_register_file: random writes on all ports (distinct registers per
// cycle) and random reads on all ports against a reference array; checks that
// the register sets of different threads are separate and that a read in the
// cycle of a write returns the old value.
module tb_register_file;
  import smt_pkg::*;
  localparam int T = 4, NRP = 6, NWP = 3;
  logic clk = 0, rst_n = 0;
  logic [NRP-1:0][TIDW-1:0] rd_tid;
  reg_t [NRP-1:0] rd_reg;
  word_t [NRP-1:0] rd_data;
  result_t [NWP-1:0] wr;
  word_t model [T][NREG];
  int checks = 0, failures = 0;

  register_file #(.T(T), .NRP(NRP), .NWP(NWP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr = '0; rd_tid = '0; rd_reg = '0;
    foreach (model[t, r]) model[t][r] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      for (int p = 0; p < NWP; p++) begin
        wr[p].valid = $urandom % 2;
        wr[p].tid   = TIDW'($urandom % T);
        wr[p].rd    = reg_t'(p * 5 + ($urandom % 5));   // distinct per port
        wr[p].data  = $urandom;
      end
      for (int p = 0; p < NRP; p++) begin
        rd_tid[p] = TIDW'($urandom % T);
        rd_reg[p] = reg_t'($urandom);
      end
      #1;
      for (int p = 0; p < NRP; p++) begin
        checks++;
        if (rd_data[p] != model[rd_tid[p]][rd_reg[p]]) begin
          failures++; $display("FAIL read t%0d r%0d", rd_tid[p], rd_reg[p]);
        end
      end
      for (int p = 0; p < NWP; p++) if (wr[p].valid) model[wr[p].tid][wr[p].rd] = wr[p].data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
