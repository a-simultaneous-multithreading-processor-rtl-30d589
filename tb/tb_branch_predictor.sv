// tb_branch_predictor: trains the thread-tagged BTB and the per-thread
// counters and checks lookups: a branch needs two taken outcomes to be
// predicted taken, another thread with the same PC is not predicted, not-taken
// outcomes turn the prediction off again, and a colliding entry replaces the
// old one.
module tb_branch_predictor;
  import smt_pkg::*;
  localparam int T = 4, NL = 2, NU = 2;
  logic clk = 0, rst_n = 0;
  logic [NL-1:0][TIDW-1:0] lk_tid;
  word_t [NL-1:0] lk_pc, lk_target;
  logic [NL-1:0] lk_taken;
  bp_update_t [NU-1:0] upd;
  int checks = 0, failures = 0;

  branch_predictor #(.T(T), .NL(NL), .NU(NU)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic train(int t, word_t pc, bit tk, word_t tgt);
    upd = '0;
    upd[0] = '{valid: 1, tid: TIDW'(t), pc: pc, taken: tk, target: tgt};
    @(negedge clk);
    upd = '0;
  endtask
  task automatic look(int t, word_t pc, output bit tk, output word_t tg);
    lk_tid[0] = TIDW'(t); lk_pc[0] = pc; #1; tk = lk_taken[0]; tg = lk_target[0];
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit tk; word_t tg;
    upd = '0; lk_tid = '0; lk_pc = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    look(1, 32'h40, tk, tg); chk(!tk, "cold miss");
    train(1, 32'h40, 1, 32'h80);
    look(1, 32'h40, tk, tg); chk(tk && tg == 32'h80, "taken after one taken (counter 1->2)");
    look(2, 32'h40, tk, tg); chk(!tk, "other thread, same pc: BTB thread id mismatch");
    train(1, 32'h40, 0, 32'h80);
    look(1, 32'h40, tk, tg); chk(!tk, "not taken after not-taken");
    train(1, 32'h40, 1, 32'h80); train(1, 32'h40, 1, 32'h80);
    look(1, 32'h40, tk, tg); chk(tk, "taken again");
    train(1, 32'h40, 0, 32'h80);
    look(1, 32'h40, tk, tg); chk(tk, "strongly taken survives one not-taken");
    // per-thread history: thread 2 trains the same index not-taken; thread 1 unaffected
    train(2, 32'h40, 0, 32'h0);
    look(1, 32'h40, tk, tg); chk(tk, "history separate per thread");
    // aliasing entry (same index, other tag) replaces the BTB entry
    train(1, 32'h40 + 32'd256, 1, 32'h300);
    look(1, 32'h40 + 32'd256, tk, tg); chk(tg == 32'h300, "new entry target");
    look(1, 32'h40, tk, tg); chk(!tk, "old entry evicted");
    // an entry written by thread 1 must not serve thread 2, even when thread 2's history says taken
    train(2, 32'h60, 1, 32'h90);
    train(1, 32'h60, 1, 32'hA0);
    look(2, 32'h60, tk, tg); chk(!tk, "BTB entry of another thread ignored");
    look(1, 32'h60, tk, tg); chk(tk && tg == 32'hA0, "owner thread hits");
    // two update ports in one cycle, different threads
    upd[0] = '{valid: 1, tid: 0, pc: 32'h10, taken: 1, target: 32'h20};
    upd[1] = '{valid: 1, tid: 3, pc: 32'h14, taken: 1, target: 32'h24};
    @(negedge clk); upd = '0;
    lk_tid[0] = 0; lk_pc[0] = 32'h10; lk_tid[1] = 3; lk_pc[1] = 32'h14; #1;
    chk(lk_taken == 2'b11 && lk_target[0] == 32'h20 && lk_target[1] == 32'h24, "two ports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
