// tb_issue_unit: directed issue scenarios with hand-worked expected results:
// in-order issue per thread, same-cycle dependencies, scoreboard stalls that
// let other threads pass, lane limits per functional-unit kind, the issue
// width, the thread priority by instructions in the functional units, a branch
// closing its thread's group, flushes, and the scoreboard latencies.
module tb_issue_unit;
  import smt_pkg::*;
  localparam int T = 4, L = 16, ISSUE_W = 4, NUM_ALU = 4, NUM_MUL = 1, NUM_LSU = 2, CW = 4;
  localparam int NLANE = NUM_ALU + NUM_MUL + NUM_LSU;
  logic [L-1:0] iq_valid, issue;
  uop_t [L-1:0] iq_uop;
  logic [T-1:0][NREG-1:0] sb_ready;
  logic [T-1:0][CW-1:0] inflight;
  logic [T-1:0] flush;
  logic [NLANE-1:0] lane_valid;
  uop_t [NLANE-1:0] lane_uop;
  logic [ISSUE_W-1:0] sb_set;
  logic [ISSUE_W-1:0][TIDW-1:0] sb_tid;
  reg_t [ISSUE_W-1:0] sb_reg;
  logic [ISSUE_W-1:0][1:0] sb_lat;
  logic dep_stall, res_stall;
  int checks = 0, failures = 0, n;

  issue_unit #(.T(T), .L(L), .ISSUE_W(ISSUE_W), .NUM_ALU(NUM_ALU), .NUM_MUL(NUM_MUL),
               .NUM_LSU(NUM_LSU), .CW(CW)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic uop_t mk(int t, fu_e fu, int rd, int rs1, int rs2, bit br = 0, bit st = 0);
    uop_t u = '0;
    u.tid = TIDW'(t); u.fu = fu; u.pc = word_t'(n * 4);
    u.rd_we = rd >= 0; u.rd = reg_t'(rd < 0 ? 0 : rd);
    u.rs1_used = rs1 >= 0; u.rs1 = reg_t'(rs1 < 0 ? 0 : rs1);
    u.rs2_used = rs2 >= 0; u.rs2 = reg_t'(rs2 < 0 ? 0 : rs2);
    u.is_branch = br; u.is_store = st; u.is_load = (fu == FU_LSU) && !st;
    return u;
  endfunction

  task automatic clear();
    iq_valid = '0; iq_uop = '0; sb_ready = '1; inflight = '0; flush = '0; n = 0;
  endtask
  task automatic add(uop_t u);
    iq_valid[n] = 1; iq_uop[n] = u; n++;
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // 1: same thread, third depends on the first -> first two issue; fourth (independent) waits (in order)
    clear();
    add(mk(0, FU_ALU, 1, 2, 3)); add(mk(0, FU_ALU, 4, 5, 6)); add(mk(0, FU_ALU, 7, 1, 2)); add(mk(0, FU_ALU, 8, 9, 9));
    #1;
    chk(issue == 16'b0011, "group stops at in-group dependency");
    chk(dep_stall && !res_stall, "dependency stall flagged");
    chk(sb_set == 4'b0011 && sb_reg[0] == 1 && sb_reg[1] == 4 && sb_lat[0] == 1, "scoreboard sets ALU latency 1");
    // 2: thread 0 blocked by scoreboard; thread 1 issues past it
    clear();
    add(mk(0, FU_ALU, 1, 2, 3)); add(mk(1, FU_ALU, 1, 2, 3)); add(mk(0, FU_ALU, 5, 6, 7)); add(mk(1, FU_MUL, 4, 1, 1));
    sb_ready[0][3] = 0;
    #1;
    chk(issue == 16'b0010, "thread 0 stalled, thread 1 first issues, its MUL depends on it");
    // 3: lane limits: two MUL (threads 0,1) -> one; three loads -> two
    clear();
    add(mk(0, FU_MUL, 1, 2, 3)); add(mk(1, FU_MUL, 1, 2, 3)); add(mk(2, FU_LSU, 1, 2, -1));
    add(mk(3, FU_LSU, 1, 2, -1)); add(mk(2, FU_LSU, 3, 4, -1));
    #1;
    chk(issue == 16'b10101, $sformatf("one MUL; both LSU lanes to thread 2, served before thread 3 (got %b)", issue));
    chk(res_stall, "resource stall flagged");
    chk(lane_valid == 7'b1110000 && lane_uop[4].tid == 0, "lanes 4 (MUL) 5,6 (LSU) used");
    chk(sb_lat[0] == 2, "MUL latency 2");
    // 4: issue width: six independent ALU ops of three threads -> four issue
    clear();
    for (int i = 0; i < 6; i++) add(mk(i % 3, FU_ALU, 1 + i, 10, 11));
    #1;
    chk($countones(issue) == 4 && lane_valid == 7'b0001111, "issue width 4");
    // 5: priority: threads 0 and 2 want the multiplier; thread 2 has fewer instructions in flight
    clear();
    add(mk(0, FU_MUL, 1, 2, 3)); add(mk(2, FU_MUL, 1, 2, 3));
    inflight[0] = 5; inflight[2] = 1;
    #1;
    chk(issue == 16'b10 && lane_uop[4].tid == 2, "fewest in flight wins");
    inflight[0] = 0; #1;
    chk(issue == 16'b01, "tie or fewer goes to thread 0");
    // 6: branch closes the group; store closes the group
    clear();
    add(mk(1, FU_ALU, -1, 2, 3, 1)); add(mk(1, FU_ALU, 4, 5, 6)); add(mk(2, FU_LSU, -1, 1, 2, 0, 1)); add(mk(2, FU_LSU, 3, 4, -1));
    #1;
    chk(issue == 16'b0101, "branch and store end their groups");
    chk(sb_set == 4'b0000, "no destination written");
    // 7: flush
    clear();
    add(mk(1, FU_ALU, 1, 2, 3)); add(mk(3, FU_ALU, 1, 2, 3));
    flush[1] = 1;
    #1;
    chk(issue == 16'b10, "flushed thread does not issue");
    // 8: WAW in group
    clear();
    add(mk(0, FU_ALU, 1, 2, 3)); add(mk(0, FU_ALU, 1, 4, 5));
    #1;
    chk(issue == 16'b01, "second writer of a register waits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
