// tb_dcache: random reads and writes on both ports and the load port against
// a reference array; reads are combinational, writes land at the clock edge.
module tb_dcache;
  import smt_pkg::*;
  localparam int NP = 2, WORDS = 64;
  logic clk = 0;
  logic [NP-1:0] valid, we;
  word_t [NP-1:0] addr, wdata, rdata;
  logic dbg_we; word_t dbg_addr, dbg_wdata, dbg_rdata;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  dcache #(.NP(NP), .WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    valid = 0; we = 0; addr = 0; wdata = 0; dbg_we = 0; dbg_addr = 0; dbg_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom; dbg_we = 1; dbg_addr = word_t'(4*i); dbg_wdata = model[i];
      @(negedge clk);
    end
    dbg_we = 0;
    for (int it = 0; it < 2000; it++) begin
      for (int p = 0; p < NP; p++) begin
        valid[p] = $urandom % 4 != 0;
        we[p]    = $urandom % 2;
        addr[p]  = word_t'(4 * (p * (WORDS/2) + $urandom % (WORDS/2)));  // ports on disjoint halves
        wdata[p] = $urandom;
      end
      dbg_addr = word_t'(4 * ($urandom % WORDS));
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++; if (rdata[p] != model[addr[p] / 4]) failures++;
      end
      checks++; if (dbg_rdata != model[dbg_addr / 4]) failures++;
      for (int p = 0; p < NP; p++) if (valid[p] && we[p]) model[addr[p] / 4] = wdata[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
