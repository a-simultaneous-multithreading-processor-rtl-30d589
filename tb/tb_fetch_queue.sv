// tb_fetch_queue: random writes, reads and per-thread flushes against a
// reference queue kept in this testbench. Checks occupancy, free count and the
// N head entries (thread, PC, word, live flag) every cycle, including the
// full and wrap-around cases.
module tb_fetch_queue;
  import smt_pkg::*;
  localparam int T = 4, N = 4, K = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] wr_valid;
  fetch_entry_t [N-1:0] wr_entry;
  logic [$clog2(N+1)-1:0] rd_n;
  logic [T-1:0] flush;
  logic [N-1:0] head_occ, head_valid;
  fetch_entry_t [N-1:0] head_entry;
  logic [$clog2(K+1)-1:0] count, free_cnt;
  int checks = 0, failures = 0, fulls = 0;

  typedef struct { fetch_entry_t e; bit live; } ment_t;
  ment_t q [$];

  fetch_queue #(.T(T), .N(N), .K(K)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int seq = 0;
    wr_valid = '0; wr_entry = '0; rd_n = '0; flush = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      automatic int room, nr;
      // stimulus
      room = K - q.size();
      wr_valid = '0;
      for (int i = 0; i < N; i++) begin
        wr_entry[i] = '{tid: TIDW'($urandom % T), pc: word_t'(seq*4), instr: $urandom, pred_npc: 0};
        seq++;
        wr_valid[i] = ($urandom % 3 != 0) && (i < room);
      end
      nr = (it % 200 < 100) ? $urandom % 2 : $urandom % (N + 1);   // phases of filling and draining
      if (nr > q.size()) nr = q.size();
      rd_n = ($clog2(N+1))'(nr);
      flush = ($urandom % 8 == 0) ? T'(1 << ($urandom % T)) : '0;
      #1;
      // compare
      chk(int'(count) == q.size(), "count");
      chk(int'(free_cnt) == K - q.size(), "free");
      if (q.size() == K) fulls++;
      for (int i = 0; i < N; i++) begin
        chk(head_occ[i] == (i < q.size()), "occ");
        if (i < q.size()) begin
          chk(head_entry[i] == q[i].e, $sformatf("entry %0d", i));
          chk(head_valid[i] == (q[i].live && !flush[q[i].e.tid]), "live");
        end
      end
      // update the reference
      foreach (q[j]) if (flush[q[j].e.tid]) q[j].live = 0;
      for (int j = 0; j < nr; j++) void'(q.pop_front());
      for (int i = 0; i < N; i++)
        if (wr_valid[i] && !flush[wr_entry[i].tid]) q.push_back('{e: wr_entry[i], live: 1});
      @(negedge clk);
    end
    chk(fulls > 0, "queue became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
