// tb_smt_core: end-to-end test of the multithreaded core.
//
// Four threads run different programs at once, twice: an array sum with a loop
// branch (loads, store, branch mispredictions while the predictor learns), a
// multiply chain (multiplier latency, forwarding, store followed by a load of
// the same word), straight-line ALU code with a jump, and a program that hits
// an undefined instruction and continues in the exception handler. A
// reference interpreter in this testbench runs the same programs one
// instruction at a time; afterwards every register of every thread, the data
// words the programs touch and each exception PC are compared. The
// instruction cache starts empty, so threads miss and wait for refills while
// others fetch. Structural
// limits are checked every cycle (issue width, fetch width, threads fetched
// per cycle), and every pipeline mechanism must have been seen at least once.
module tb_smt_core;
  import smt_pkg::*;

  localparam int T = 4, N = 4, M = 2, ISSUE_W = 4;
  localparam int IWORDS = 1024, DWORDS = 1024;
  localparam word_t EXC_VEC = 32'h0000_0F00;

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

  smt_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- programs ----------------
  word_t prog [IWORDS];
  word_t dinit [DWORDS];
  bit    dused [DWORDS];

  task automatic put(inout int a, input word_t w);
    prog[a/4] = w;
    a += 4;
  endtask

  task automatic build();
    int a;
    for (int i = 0; i < IWORDS; i++) prog[i] = enc_i(OP_NOP, 0, 0, 0);
    for (int i = 0; i < DWORDS; i++) begin dinit[i] = 32'(i * 7 + 3); dused[i] = 0; end
    // thread 0: sum eight words at 0x100, store at 0x200
    a = 'h000;
    put(a, enc_i(OP_ADDI, 1, 0, 'h100));
    put(a, enc_i(OP_ADDI, 2, 0, 8));
    put(a, enc_i(OP_ADDI, 3, 0, 0));
    put(a, enc_i(OP_LD,   4, 1, 0));          // loop (0x0C)
    put(a, enc_r(OP_ADD,  3, 3, 4));
    put(a, enc_i(OP_ADDI, 1, 1, 4));
    put(a, enc_i(OP_ADDI, 2, 2, -1));
    put(a, enc_i(OP_BNE,  2, 0, -4));         // back to 0x0C
    put(a, enc_i(OP_ST,   3, 0, 'h200));
    put(a, enc_i(OP_HALT, 0, 0, 0));
    // thread 1: product 1*2*..*6, store and reload
    a = 'h400;
    put(a, enc_i(OP_ADDI, 1, 0, 1));
    put(a, enc_i(OP_ADDI, 2, 0, 1));
    put(a, enc_i(OP_ADDI, 3, 0, 7));
    put(a, enc_r(OP_MUL,  1, 1, 2));          // loop (0x40C)
    put(a, enc_i(OP_ADDI, 2, 2, 1));
    put(a, enc_i(OP_BNE,  2, 3, -2));
    put(a, enc_i(OP_ST,   1, 0, 'h208));
    put(a, enc_i(OP_LD,   5, 0, 'h208));
    put(a, enc_r(OP_ADD,  6, 5, 5));
    put(a, enc_r(OP_MUL,  7, 6, 1));
    put(a, enc_r(OP_SUB,  8, 7, 6));
    put(a, enc_i(OP_ST,   8, 0, 'h20C));
    put(a, enc_i(OP_HALT, 0, 0, 0));
    // thread 2: independent ALU work and a forward jump
    a = 'h800;
    put(a, enc_i(OP_LUI,  1, 0, 3));
    put(a, enc_i(OP_ADDI, 2, 0, -5));
    put(a, enc_i(OP_ADDI, 3, 0, 12));
    put(a, enc_r(OP_XOR,  4, 1, 2));
    put(a, enc_r(OP_OR,   5, 1, 3));
    put(a, enc_r(OP_AND,  6, 2, 3));
    put(a, enc_r(OP_SLL,  7, 3, 3));
    put(a, enc_r(OP_SRL,  8, 2, 3));
    put(a, enc_r(OP_SLT,  9, 2, 3));
    put(a, enc_r(OP_SLT, 10, 3, 2));
    put(a, enc_i(OP_JMP,  0, 0, 2));
    put(a, enc_i(OP_ADDI, 11, 0, 99));        // skipped
    put(a, enc_r(OP_SUB, 12, 4, 5));
    put(a, enc_i(OP_BEQ,  3, 3, 2));
    put(a, enc_i(OP_ADDI, 13, 0, 77));        // skipped
    put(a, enc_r(OP_ADD, 14, 12, 7));
    put(a, enc_i(OP_ST,  14, 0, 'h210));
    put(a, enc_i(OP_HALT, 0, 0, 0));
    // thread 3: undefined instruction, then the handler
    a = 'hC00;
    put(a, enc_i(OP_ADDI, 1, 0, 40));
    put(a, enc_i(OP_ADDI, 2, 1, 2));
    put(a, {6'h3F, 26'd0});                   // undefined
    put(a, enc_i(OP_ADDI, 9, 0, 99));         // never executed
    put(a, enc_i(OP_HALT, 0, 0, 0));
    a = int'(EXC_VEC);
    put(a, enc_i(OP_ADDI, 15, 15, 1));
    put(a, enc_r(OP_ADD,  14, 2, 2));
    put(a, enc_i(OP_HALT, 0, 0, 0));
  endtask

  // ---------------- reference interpreter ----------------
  word_t ref_r [T][NREG];
  word_t ref_m [DWORDS];
  word_t ref_epc [T];
  int    ref_n [T];

  function automatic word_t sx(logic [17:0] i);
    return {{14{i[17]}}, i};
  endfunction

  task automatic run_ref(int t, word_t pc0);
    word_t pc = pc0;
    for (int steps = 0; steps < 10000; steps++) begin
      word_t w = prog[(pc/4) % IWORDS];
      logic [5:0] op = w[31:26];
      int ra = int'(w[25:22]), rb = int'(w[21:18]), rc = int'(w[17:14]);
      word_t im = sx(w[17:0]);
      word_t npc = pc + 4;
      ref_n[t]++;
      case (op)
        6'h00: ;
        6'h01: ref_r[t][ra] = ref_r[t][rb] + ref_r[t][rc];
        6'h02: ref_r[t][ra] = ref_r[t][rb] - ref_r[t][rc];
        6'h03: ref_r[t][ra] = ref_r[t][rb] & ref_r[t][rc];
        6'h04: ref_r[t][ra] = ref_r[t][rb] | ref_r[t][rc];
        6'h05: ref_r[t][ra] = ref_r[t][rb] ^ ref_r[t][rc];
        6'h06: ref_r[t][ra] = ref_r[t][rb] << ref_r[t][rc][4:0];
        6'h07: ref_r[t][ra] = ref_r[t][rb] >> ref_r[t][rc][4:0];
        6'h08: ref_r[t][ra] = ($signed(ref_r[t][rb]) < $signed(ref_r[t][rc])) ? 1 : 0;
        6'h09: ref_r[t][ra] = ref_r[t][rb] + im;
        6'h0A: ref_r[t][ra] = {w[17:0], 14'd0};
        6'h0B: ref_r[t][ra] = ref_r[t][rb] * ref_r[t][rc];
        6'h0C: ref_r[t][ra] = ref_m[((ref_r[t][rb] + im) / 4) % DWORDS];
        6'h0D: ref_m[((ref_r[t][rb] + im) / 4) % DWORDS] = ref_r[t][ra];
        6'h0E: if (ref_r[t][ra] == ref_r[t][rb]) npc = pc + (im << 2);
        6'h0F: if (ref_r[t][ra] != ref_r[t][rb]) npc = pc + (im << 2);
        6'h10: npc = pc + (im << 2);
        6'h11: return;
        default: begin ref_epc[t] = pc; npc = EXC_VEC; end
      endcase
      pc = npc;
    end
  endtask

  // ---------------- run ----------------
  int cycles = 0, n_issued = 0, n_retired = 0;
  int c_mispredict = 0, c_exception = 0, c_halt = 0, c_dep = 0, c_res = 0, c_fqfull = 0,
      c_hole = 0, c_multi_issue = 0, c_multi_fetch = 0, c_forward = 0,
      c_icwait = 0, c_nonblock = 0;
  bit running = 0;

  always @(posedge clk) if (running) begin
    cycles++;
    n_issued  += int'(ev_issued);
    n_retired += int'(ev_retired);
    c_mispredict += int'(ev_mispredict);
    c_exception  += int'(ev_exception);
    c_halt       += int'(ev_halt);
    c_dep        += int'(ev_dep_stall);
    c_res        += int'(ev_res_stall);
    c_fqfull     += int'(ev_fq_full);
    c_hole       += int'(ev_iq_hole);
    c_forward    += int'(ev_forward);
    c_icwait     += int'(ev_icache_wait);
    if (ev_icache_wait && ev_fetch_threads != '0) c_nonblock++;
    if ($countones(ev_issue_threads) >= 2) c_multi_issue++;
    if ($countones(ev_fetch_threads) >= 2) c_multi_fetch++;
    if (int'(ev_issued) > ISSUE_W) check(0, "issue width exceeded");
    if ($countones(ev_fetch_threads) > M) check(0, "more than M threads fetched");
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base [T] = '{'h000, 'h400, 'h800, 'hC00};
    thread_en = '1;
    for (int t = 0; t < T; t++) start_pc[t] = word_t'(base[t]);
    dbg_tid = '0; dbg_reg = '0;
    imem_addr = '0; imem_wdata = '0; dmem_addr = '0; dmem_wdata = '0;
    build();
    for (int i = 0; i < DWORDS; i++) ref_m[i] = dinit[i];
    for (int t = 0; t < T; t++) begin
      ref_epc[t] = '0; ref_n[t] = 0;
      for (int r = 0; r < NREG; r++) ref_r[t][r] = '0;
      run_ref(t, word_t'(base[t]));
      run_ref(t, word_t'(base[t]));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < IWORDS; i++) begin
      imem_we = 1'b1; imem_addr = word_t'(4*i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    for (int i = 0; i < DWORDS; i++) begin
      dmem_we = 1'b1; dmem_addr = word_t'(4*i); dmem_wdata = dinit[i];
      @(negedge clk);
    end
    dmem_we = 1'b0;
    // Two runs: the first starts with an empty instruction cache, the second
    // finds the code cached. Registers carry over from the first run.
    for (int run = 0; run < 2; run++) begin
      start = 1'b1; running = 1;
      @(negedge clk);
      start = 1'b0;
      while (thread_active != '0 && cycles < 5000) @(negedge clk);
      repeat (8) @(negedge clk);
    end
    running = 0;
    check(thread_active == '0, "all threads halted");
    for (int t = 0; t < T; t++)
      for (int r = 0; r < NREG; r++) begin
        dbg_tid = TIDW'(t); dbg_reg = reg_t'(r);
        #1;
        check(dbg_rdata == ref_r[t][r],
              $sformatf("thread %0d r%0d = %h, expected %h", t, r, dbg_rdata, ref_r[t][r]));
      end
    for (int i = 0; i < DWORDS; i++) begin
      dmem_addr = word_t'(4*i);
      #1;
      if (ref_m[i] != dinit[i] || i == 'h200/4)
        check(dmem_rdata == ref_m[i], $sformatf("mem[%h] = %h, expected %h", 4*i, dmem_rdata, ref_m[i]));
    end
    check(epc[3] == ref_epc[3] && ref_epc[3] == 32'hC08, "exception PC of thread 3");
    check(ref_r[0][3] != 0 && ref_r[1][1] == 720, "reference results sane");
    check(c_mispredict > 0, "branch misprediction seen");
    check(c_exception == 2, "one exception per run");
    check(c_halt == 2 * T, "every thread halted once per run");
    check(c_dep > 0, "dependency stall seen");
    check(c_res > 0, "resource stall seen");
    check(c_fqfull > 0, "fetch queue full seen");
    check(c_hole > 0, "issue queue compression of a hole seen");
    check(c_multi_issue > 0, "instructions of several threads issued in one cycle");
    check(c_multi_fetch > 0, "several threads fetched in one cycle");
    check(c_forward > 0, "operand forwarding seen");
    check(c_icwait > 0, "instruction-cache miss wait seen");
    check(c_nonblock > 0, "other threads fetched while a thread waited for a refill");
    check(ref_r[3][15] == 2, "handler ran once per run");
    check(n_issued >= ref_n[0] + ref_n[1] + ref_n[2] + ref_n[3], "issued at least the committed count");
    $display("cycles=%0d issued=%0d retired=%0d committed(ref)=%0d mispredict=%0d exc=%0d dep=%0d res=%0d fqfull=%0d hole=%0d multi_issue=%0d multi_fetch=%0d fwd=%0d icwait=%0d nonblock=%0d",
             cycles, n_issued, n_retired, ref_n[0]+ref_n[1]+ref_n[2]+ref_n[3], c_mispredict,
             c_exception, c_dep, c_res, c_fqfull, c_hole, c_multi_issue, c_multi_fetch, c_forward, c_icwait, c_nonblock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
