// tb_scoreboard: random set requests (latency 1 or 2) on all ports against a
// reference array of countdowns; checks every ready bit each cycle and that a
// register set with latency L becomes ready exactly L cycles later.
module tb_scoreboard;
  import smt_pkg::*;
  localparam int T = 4, NS = 4;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] set_valid;
  logic [NS-1:0][TIDW-1:0] set_tid;
  reg_t [NS-1:0] set_reg;
  logic [NS-1:0][1:0] set_lat;
  logic [T-1:0][NREG-1:0] ready;
  int cnt [T][NREG];
  int checks = 0, failures = 0;

  scoreboard #(.T(T), .NS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    set_valid = '0; set_tid = '0; set_reg = '0; set_lat = '0;
    foreach (cnt[t, r]) cnt[t][r] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // latency check on one register
    set_valid[0] = 1; set_tid[0] = 2; set_reg[0] = 5; set_lat[0] = 2;
    @(negedge clk); set_valid = '0;
    checks++; if (ready[2][5]) failures++;
    @(negedge clk);
    checks++; if (ready[2][5]) failures++;
    @(negedge clk);
    checks++; if (!ready[2][5]) failures++;
    for (int it = 0; it < 1000; it++) begin
      for (int s = 0; s < NS; s++) begin
        set_valid[s] = $urandom % 2;
        set_tid[s]   = TIDW'(s);          // distinct threads: no port collisions
        set_reg[s]   = reg_t'($urandom);
        set_lat[s]   = 2'(1 + $urandom % 2);
      end
      #1;
      for (int t = 0; t < T; t++)
        for (int r = 0; r < NREG; r++) begin
          checks++;
          if (ready[t][r] != (cnt[t][r] == 0)) begin failures++; $display("FAIL t%0d r%0d", t, r); end
        end
      foreach (cnt[t, r]) if (cnt[t][r] > 0) cnt[t][r]--;
      for (int s = 0; s < NS; s++) if (set_valid[s]) cnt[set_tid[s]][set_reg[s]] = int'(set_lat[s]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
