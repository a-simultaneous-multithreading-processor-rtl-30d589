// tb_smt_workload: throughput of the core as the number of threads grows, on
// three configurations run side by side:
//   four-issue, 4 threads  (default parameters, 1..4 threads)
//   four-issue, 8 threads  (T = 8, 1..8 threads)
//   eight-issue, 8 threads (fetch 8 from 2 threads, issue 8, 6 ALU + 2 MUL +
//                           3 load/store lanes, 32-entry queues; 1..8 threads)
// Each run checks the kernel results and that instructions per cycle rise with
// the thread count. Across configurations, the eight-issue core must deliver
// more instructions per cycle than the four-issue core with eight threads.
module tb_smt_workload;
  logic d4, d8, dw;
  int   c4, c8, cw, f4, f8, fw;
  real  i4 [9], i8 [9], iw [9];

  smt_workload_run #(.NAME("four-issue/4T"), .T(4)) run4
    (.done(d4), .checks(c4), .failures(f4), .ipc_out(i4));
  smt_workload_run #(.NAME("four-issue/8T"), .T(8)) run8
    (.done(d8), .checks(c8), .failures(f8), .ipc_out(i8));
  smt_workload_run #(.NAME("eight-issue/8T"), .T(8), .N(8), .M(2), .K(32), .L(32),
                     .ISSUE_W(8), .NUM_ALU(6), .NUM_MUL(2), .NUM_LSU(3)) runw
    (.done(dw), .checks(cw), .failures(fw), .ipc_out(iw));

  int checks = 0, failures = 0;

  initial begin
    #100_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + cw + checks, f4 + f8 + fw + failures + 1);
    $finish;
  end

  initial begin
    wait (d4 && d8 && dw);
    #1;
    checks++;
    if (!(iw[8] > i8[8])) begin
      failures++;
      $display("FAIL: eight-issue IPC %0.2f not above four-issue IPC %0.2f at 8 threads", iw[8], i8[8]);
    end
    checks++;
    if (!(i8[4] > 0.9 * i4[4] && i8[4] < 1.1 * i4[4])) begin
      failures++;
      $display("FAIL: four threads on the 8-thread core differ from the 4-thread core");
    end
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + cw + checks, f4 + f8 + fw + failures);
    $finish;
  end
endmodule
// smt_workload_run: runs the workload kernel on one core configuration with
// 1..T threads and checks results and the rise of instructions per cycle.
// Every thread runs the same kind of kernel over its own 32-word array (load,
// add, multiply, xor, loop branch) and stores three results. Each thread count
// runs twice; the first run warms the instruction cache and the second is
// measured. Results are checked against closed-form values. As more threads
// share the core, instructions per cycle must rise (up to ISSUE_W threads, then
// hold), and with T threads reach at least twice the single-thread figure.
module smt_workload_run #(
  parameter string NAME = "four-issue",
  parameter int T = 4, N = 4, M = 2, K = 16, L = 16, ISSUE_W = 4,
  parameter int NUM_ALU = 4, NUM_MUL = 1, NUM_LSU = 2
) (
  output logic done,
  output int   checks,
  output int   failures,
  output real  ipc_out [9]
);
  import smt_pkg::*;

  localparam int IWORDS = 1024, DWORDS = 1024, ITER = 32;
  localparam int KERNEL_LEN = 5 + 8 * ITER + 4;   // instructions executed per thread
  localparam int CODE_STRIDE = 'h50;   // 20 words per thread: all kernels fit the instruction cache
  localparam int DBASE = 'h400;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [T-1:0] thread_en;
  word_t [T-1:0] start_pc;
  logic imem_we = 1'b0, dmem_we = 1'b0;
  word_t imem_addr, imem_wdata, dmem_addr, dmem_wdata, dmem_rdata, dbg_rdata;
  logic [TIDW-1:0] dbg_tid;
  reg_t dbg_reg;
  logic [T-1:0] thread_active;
  word_t [T-1:0] epc;
  logic [$clog2(ISSUE_W+1)-1:0] ev_issued;
  logic [T-1:0] ev_issue_threads, ev_fetch_threads;
  logic [3:0] ev_retired;
  logic ev_mispredict, ev_exception, ev_halt, ev_dep_stall, ev_res_stall, ev_fq_full,
        ev_iq_hole, ev_forward, ev_icache_wait;

  smt_core #(.T(T), .N(N), .M(M), .K(K), .L(L), .ISSUE_W(ISSUE_W), .NUM_ALU(NUM_ALU),
             .NUM_MUL(NUM_MUL), .NUM_LSU(NUM_LSU)) dut (.*);
  always #5 clk = ~clk;

  initial begin done = 1'b0; checks = 0; failures = 0; end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t prog [IWORDS];
  function automatic word_t dval(int t, int i);
    return word_t'(t * 1000 + i * 7 + 1);
  endfunction

  task automatic build();
    for (int i = 0; i < IWORDS; i++) prog[i] = '0;
    for (int t = 0; t < T; t++) begin
      automatic int a = t * CODE_STRIDE / 4;
      automatic int db = DBASE + t * 'h100;
      prog[a++] = enc_i(OP_ADDI, 1, 0, db);
      prog[a++] = enc_i(OP_ADDI, 2, 0, ITER);
      prog[a++] = enc_i(OP_ADDI, 3, 0, 0);
      prog[a++] = enc_i(OP_ADDI, 7, 0, 0);
      prog[a++] = enc_i(OP_ADDI, 8, 0, 0);
      prog[a++] = enc_i(OP_LD,   4, 1, 0);     // loop
      prog[a++] = enc_r(OP_ADD,  3, 3, 4);
      prog[a++] = enc_r(OP_MUL,  6, 4, 4);
      prog[a++] = enc_r(OP_ADD,  7, 7, 6);
      prog[a++] = enc_r(OP_XOR,  8, 8, 4);
      prog[a++] = enc_i(OP_ADDI, 1, 1, 4);
      prog[a++] = enc_i(OP_ADDI, 2, 2, -1);
      prog[a++] = enc_i(OP_BNE,  2, 0, -7);
      prog[a++] = enc_i(OP_ST,   3, 1, 0);
      prog[a++] = enc_i(OP_ST,   7, 1, 4);
      prog[a++] = enc_i(OP_ST,   8, 1, 8);
      prog[a++] = enc_i(OP_HALT, 0, 0, 0);
    end
  endtask

  real ipc [T+1];

  initial begin
    dbg_tid = '0; dbg_reg = '0; imem_addr = '0; imem_wdata = '0; dmem_addr = '0; dmem_wdata = '0;
    for (int t = 0; t < T; t++) start_pc[t] = word_t'(t * CODE_STRIDE);
    build();
    for (int nt = 1; nt <= T; nt++) begin
      automatic int cycles = 0;
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int i = 0; i < IWORDS; i++) begin
        imem_we = 1'b1; imem_addr = word_t'(4*i); imem_wdata = prog[i]; @(negedge clk);
      end
      imem_we = 1'b0;
      for (int t = 0; t < T; t++)
        for (int i = 0; i < ITER + 3; i++) begin
          dmem_we = 1'b1; dmem_addr = word_t'(DBASE + t * 'h100 + 4*i);
          dmem_wdata = (i < ITER) ? dval(t, i) : 32'hDEAD_BEEF;
          @(negedge clk);
        end
      dmem_we = 1'b0;
      thread_en = T'((1 << nt) - 1);
      // warm-up run: fills the instruction cache; the measured run repeats it
      start = 1'b1; @(negedge clk); start = 1'b0;
      while (thread_active != '0) @(negedge clk);
      repeat (6) @(negedge clk);
      start = 1'b1; @(negedge clk); start = 1'b0;
      cycles = 1;
      while (thread_active != '0 && cycles < 20000) begin @(negedge clk); cycles++; end
      repeat (6) @(negedge clk);
      ipc[nt] = real'(nt * KERNEL_LEN) / real'(cycles);
      $display("%s threads=%0d cycles=%0d instructions=%0d IPC=%0.2f", NAME, nt, cycles, nt * KERNEL_LEN, ipc[nt]);
      for (int t = 0; t < nt; t++) begin
        automatic word_t s = 0, sq = 0, x = 0;
        for (int i = 0; i < ITER; i++) begin
          s += dval(t, i); sq += dval(t, i) * dval(t, i); x ^= dval(t, i);
        end
        for (int k = 0; k < 3; k++) begin
          dmem_addr = word_t'(DBASE + t * 'h100 + 4*ITER + 4*k);
          #1;
          check(dmem_rdata == ((k == 0) ? s : (k == 1) ? sq : x),
                $sformatf("threads=%0d thread %0d result %0d = %h", nt, t, k, dmem_rdata));
        end
      end
      for (int t = nt; t < T; t++) begin
        dmem_addr = word_t'(DBASE + t * 'h100 + 4*ITER);
        #1;
        check(dmem_rdata == 32'hDEAD_BEEF, "disabled thread did not run");
      end
    end
    // up to ISSUE_W threads every added thread must raise IPC; past that the
    // issue width saturates and IPC must merely hold within 10 %
    for (int nt = 2; nt <= T; nt++)
      if (nt <= ISSUE_W) check(ipc[nt] > ipc[nt-1], $sformatf("%s: IPC rises from %0d to %0d threads", NAME, nt-1, nt));
      else               check(ipc[nt] > 0.9 * ipc[nt-1], $sformatf("%s: IPC holds from %0d to %0d threads", NAME, nt-1, nt));
    check(ipc[T] >= 2.0 * ipc[1], $sformatf("%s: %0d threads give at least 2x the single-thread IPC", NAME, T));
    for (int nt = 1; nt <= T; nt++) ipc_out[nt] = ipc[nt];
    done = 1'b1;
  end
endmodule
