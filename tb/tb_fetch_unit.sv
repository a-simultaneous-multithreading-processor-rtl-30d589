// tb_fetch_unit: the fetch unit with an instruction-memory stand-in that
// returns, one cycle after the address, words derived from their address.
// Checks: at most M threads and N instructions per cycle, FPT consecutive
// instructions per thread, each thread's fetched PCs follow on from the last
// ones (or from a redirect) with the right words, round-robin fairness, no
// fetch without queue room, a trained taken branch ends its block and sends
// the thread to the target, a halt stops a thread and an exception records its
// PC. A block that misses in the cache is refetched from its first PC after
// a refill, while the other threads keep fetching.
module tb_fetch_unit;
  import smt_pkg::*;
  localparam int T = 4, N = 4, M = 2, NR = 2, NU = 1, FPT = N / M;
  logic clk = 0, rst_n = 0, start = 0, fq_room;
  logic [T-1:0] thread_en, thread_active, flush_mask;
  word_t [T-1:0] start_pc, epc;
  redirect_t [NR-1:0] redirect;
  bp_update_t [NU-1:0] bp_upd;
  logic [M-1:0] ic_rd_en;
  word_t [M-1:0] ic_rd_addr;
  word_t [M-1:0][FPT-1:0] ic_rd_data;
  logic [M-1:0] ic_rd_hit;
  logic ic_refill_done;
  logic [T-1:0] ic_wait;
  bit refilled = 0;
  logic [N-1:0] fe_valid;
  fetch_entry_t [N-1:0] fe_entry;
  int checks = 0, failures = 0;
  word_t exp_pc [T];
  int nfetch [T];

  fetch_unit #(.T(T), .N(N), .M(M), .NR(NR), .NU(NU)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t memword(word_t a);
    return a ^ 32'hABCD_0000;
  endfunction
  // Addresses 0x5000..0x5FFF miss until the testbench declares them refilled.
  always_ff @(posedge clk)
    for (int p = 0; p < M; p++) begin
      for (int k = 0; k < FPT; k++) ic_rd_data[p][k] <= memword(ic_rd_addr[p] + word_t'(4*k));
      ic_rd_hit[p] <= !(ic_rd_addr[p][31:12] == 20'h5 && !refilled);
    end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // Per-cycle check of the fetch-stage output against each thread's expected PC.
  bit monitor = 0;
  always @(negedge clk) if (monitor) begin
    automatic int nthreads = 0;
    automatic logic [T-1:0] seen = '0;
    #1;
    chk($countones(fe_valid) <= N, "fetch width");
    for (int i = 0; i < N; i++) if (fe_valid[i]) begin
      automatic int t = int'(fe_entry[i].tid);
      if (!seen[t]) nthreads++;
      seen[t] = 1;
      chk(fe_entry[i].pc == exp_pc[t], $sformatf("thread %0d pc %h exp %h", t, fe_entry[i].pc, exp_pc[t]));
      chk(fe_entry[i].instr == memword(fe_entry[i].pc), "instruction word");
      exp_pc[t] = fe_entry[i].pred_npc;
      nfetch[t]++;
    end
    chk(nthreads <= M, "threads per cycle");
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    redirect = '0; bp_upd = '0; fq_room = 1; ic_refill_done = 0;
    thread_en = 4'b1111;
    for (int t = 0; t < T; t++) begin start_pc[t] = word_t'(32'h1000 * t); exp_pc[t] = start_pc[t]; nfetch[t] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    monitor = 1;
    repeat (40) @(negedge clk);
    for (int t = 0; t < T; t++) chk(nfetch[t] >= 38 && nfetch[t] <= 42, $sformatf("fair share thread %0d: %0d", t, nfetch[t]));
    // no room: nothing fetched after the fetch stage drains
    fq_room = 0; @(negedge clk); @(negedge clk);
    repeat (5) begin chk(fe_valid == '0, "no fetch without room"); @(negedge clk); end
    fq_room = 1;
    // train a taken branch of thread 1 at its current PC + 4 (second slot of its next block)
    bp_upd[0] = '{valid: 1, tid: 1, pc: 32'h1000 + 32'h400, taken: 1, target: 32'h1800};
    @(negedge clk); bp_upd = '0;
    // redirect thread 1 to 0x13FC, so its next block is 0x13FC, 0x1400 (predicted taken)
    redirect[0] = '{valid: 1, tid: 1, npc: 32'h13FC, halt: 0, exception: 0, mispredict: 1, epc: 0};
    #1 chk(flush_mask == 4'b0010, "flush mask");
    @(negedge clk); redirect = '0;
    exp_pc[1] = 32'h13FC;
    repeat (6) @(negedge clk);
    chk(exp_pc[1] >= 32'h1800 && exp_pc[1] < 32'h1900, "thread 1 followed the predicted taken branch");
    // halt thread 2, exception on thread 3
    redirect[0] = '{valid: 1, tid: 2, npc: 0, halt: 1, exception: 0, mispredict: 0, epc: 0};
    redirect[1] = '{valid: 1, tid: 3, npc: 32'h0F00, halt: 0, exception: 1, mispredict: 0, epc: 32'h3010};
    @(negedge clk); redirect = '0;
    exp_pc[3] = 32'h0F00;
    nfetch[2] = 0;
    repeat (10) @(negedge clk);
    chk(thread_active == 4'b1011, "thread 2 halted");
    chk(nfetch[2] == 0, "halted thread not fetched");
    chk(epc[3] == 32'h3010, "exception PC recorded");
    // instruction-cache miss: thread 3 goes to a missing region and waits; thread 0 and 1 keep fetching
    redirect[0] = '{valid: 1, tid: 3, npc: 32'h5008, halt: 0, exception: 0, mispredict: 1, epc: 0};
    @(negedge clk); redirect = '0;
    exp_pc[3] = 32'h5008;
    nfetch[3] = 0; nfetch[0] = 0;
    repeat (8) @(negedge clk);
    chk(nfetch[3] == 0 && ic_wait[3], "missing thread waits");
    chk(nfetch[0] > 0, "other threads fetch during the miss");
    refilled = 1; ic_refill_done = 1; @(negedge clk); ic_refill_done = 0;
    repeat (4) @(negedge clk);
    chk(nfetch[3] > 0 && !ic_wait[3], "thread fetches again after the refill, from the missed PC");
    monitor = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
