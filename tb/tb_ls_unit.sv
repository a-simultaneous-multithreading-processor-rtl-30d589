// tb_ls_unit: random loads and stores in the execute stage; one cycle later
// the data cache request must carry base + immediate, the store data and the
// write enable, a killed access must not appear, and the load result must be
// the word returned by the cache port.
module tb_ls_unit;
  import smt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ex_valid, ex_load, ex_store, kill;
  word_t ex_base, ex_imm, ex_sdata;
  logic dc_valid, dc_we;
  word_t dc_addr, dc_wdata, dc_rdata, load_data;
  int checks = 0, failures = 0;

  ls_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ex_valid = 0; ex_load = 0; ex_store = 0; kill = 0; ex_base = 0; ex_imm = 0; ex_sdata = 0; dc_rdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      automatic bit v, ld, st, k;
      automatic word_t ea, sd;
      v = $urandom % 4 != 0; ld = $urandom % 2; st = !ld && ($urandom % 4 != 0); k = $urandom % 6 == 0;
      ex_valid = v; ex_load = ld; ex_store = st; kill = k;
      ex_base = $urandom; ex_imm = $urandom; ex_sdata = $urandom;
      ea = ex_base + ex_imm; sd = ex_sdata;
      @(negedge clk);
      ex_valid = 0;
      dc_rdata = $urandom;
      #1;
      chk(dc_valid == (v && (ld || st) && !k), "request valid");
      if (dc_valid) begin
        chk(dc_addr == ea, "address");
        chk(dc_we == st, "write enable");
        if (st) chk(dc_wdata == sd, "store data");
      end
      chk(load_data == dc_rdata, "load data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
