// tb_issue_queue: random insertions, random issue masks (out of order, as
// when other threads issue first) and per-thread flushes against a reference
// list. After each cycle the queue must hold exactly the remaining
// instructions, packed from entry 0 in age order with no holes.
module tb_issue_queue;
  import smt_pkg::*;
  localparam int T = 4, N = 4, L = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ins_valid;
  uop_t [N-1:0] ins_uop;
  logic [L-1:0] issue;
  logic [T-1:0] flush;
  logic [L-1:0] valid;
  uop_t [L-1:0] uop;
  logic [$clog2(L+1)-1:0] free_cnt;
  int checks = 0, failures = 0, holes = 0;
  uop_t q [$];

  issue_queue #(.T(T), .N(N), .L(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int seq = 1;
    ins_valid = '0; ins_uop = '0; issue = '0; flush = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      automatic uop_t nq [$];
      automatic int free = L - q.size();
      automatic bit gap = 0;
      for (int i = 0; i < N; i++) begin
        ins_uop[i] = '0;
        ins_uop[i].tid = TIDW'($urandom % T);
        ins_uop[i].pc  = word_t'(seq++);
        ins_valid[i] = (i < free) && ($urandom % 2 == 0);
      end
      issue = '0;
      for (int e = 0; e < q.size(); e++) issue[e] = ($urandom % 4 == 0);
      flush = ($urandom % 10 == 0) ? T'(1 << ($urandom % T)) : '0;
      #1;
      chk(int'(free_cnt) == L - q.size(), "free count");
      for (int e = 0; e < L; e++) begin
        chk(valid[e] == (e < q.size()), $sformatf("valid %0d", e));
        if (e < q.size()) chk(uop[e] == q[e], $sformatf("entry %0d", e));
      end
      for (int e = 0; e < q.size(); e++) begin
        if (issue[e]) gap = 1; else if (gap) holes++;
        if (!issue[e] && !flush[q[e].tid]) nq.push_back(q[e]);
      end
      for (int i = 0; i < N; i++)
        if (ins_valid[i] && !flush[ins_uop[i].tid]) nq.push_back(ins_uop[i]);
      q = nq;
      @(negedge clk);
    end
    chk(holes > 0, "holes were compressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
