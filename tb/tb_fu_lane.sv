// tb_fu_lane: one ALU lane, one multiplier lane and one load/store lane.
// The register file is a function of (thread, register) so every operand is
// known. Checks: results reach the write stage four cycles after issue and an
// ALU result is forwardable one cycle earlier; forwarded values override the
// register file, the younger (lower index) source first; a taken branch
// predicted not-taken raises a misprediction redirect and a predictor update
// in the memory stage; an undefined instruction raises an exception to the
// vector; a halt raises a halt; a flush of the thread drops the instruction
// from the read and execute stages; the multiplier product and the
// load/store cache requests and load data.
module tb_fu_lane;
  import smt_pkg::*;
  localparam int T = 4, NF = 3;
  localparam word_t VEC = 32'h0000_0F00;
  logic clk = 0, rst_n = 0;
  logic [T-1:0] flush;
  result_t [NF-1:0] fwd;
  int checks = 0, failures = 0;

  logic  [2:0] in_valid;
  uop_t  [2:0] in_uop;
  logic  [2:0][1:0][TIDW-1:0] rf_tid;
  reg_t  [2:0][1:0] rf_reg;
  word_t [2:0][1:0] rf_data;
  result_t [2:0] mem_fwd, wb;
  redirect_t [2:0] redirect;
  bp_update_t [2:0] bp_upd;
  logic [2:0] dc_valid, dc_we, fwd_used;
  word_t [2:0] dc_addr, dc_wdata, dc_rdata;
  logic [2:0][2:0] occ_valid;
  logic [2:0][2:0][TIDW-1:0] occ_tid;

  function automatic word_t rfv(logic [TIDW-1:0] t, reg_t r);
    return 32'h1000 * (int'(t) + 1) + 32'(r) * 3 + 1;
  endfunction

  always_comb
    for (int l = 0; l < 3; l++)
      for (int p = 0; p < 2; p++) rf_data[l][p] = rfv(rf_tid[l][p], rf_reg[l][p]);

  always_comb dc_rdata[2] = dc_addr[2] ^ 32'h5A5A_0000;
  assign dc_rdata[1:0] = '0;

  for (genvar l = 0; l < 3; l++) begin : g
    localparam fu_e K = (l == 0) ? FU_ALU : (l == 1) ? FU_MUL : FU_LSU;
    fu_lane #(.KIND(K), .T(T), .NF(NF), .EXC_VEC(VEC)) dut (
      .clk, .rst_n, .in_valid(in_valid[l]), .in_uop(in_uop[l]), .flush,
      .rf_tid(rf_tid[l]), .rf_reg(rf_reg[l]), .rf_data(rf_data[l]), .fwd,
      .mem_fwd(mem_fwd[l]), .wb(wb[l]), .redirect(redirect[l]), .bp_upd(bp_upd[l]),
      .dc_valid(dc_valid[l]), .dc_we(dc_we[l]), .dc_addr(dc_addr[l]), .dc_wdata(dc_wdata[l]),
      .dc_rdata(dc_rdata[l]), .occ_valid(occ_valid[l]), .occ_tid(occ_tid[l]), .fwd_used(fwd_used[l]));
  end

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic uop_t alu(int t, alu_op_e op, int rd, int rs1, int rs2);
    uop_t u = '0;
    u.tid = TIDW'(t); u.fu = FU_ALU; u.alu_op = op; u.pc = 32'h100; u.pred_npc = 32'h104;
    u.rd_we = rd >= 0; u.rd = reg_t'(rd < 0 ? 0 : rd);
    u.rs1_used = 1; u.rs1 = reg_t'(rs1); u.rs2_used = rs2 >= 0; u.rs2 = reg_t'(rs2 < 0 ? 0 : rs2);
    return u;
  endfunction

  // issue on lane l at this negedge, then step one cycle
  task automatic iss(int l, uop_t u);
    in_valid = '0; in_uop = '0;
    in_valid[l] = 1; in_uop[l] = u;
    @(negedge clk);
    in_valid = '0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    uop_t u;
    in_valid = '0; in_uop = '0; flush = '0; fwd = '0;
    repeat (2) @(negedge clk); rst_n = 1;

    // ALU add: result in memory stage after 3 cycles, write stage after 4
    iss(0, alu(1, A_ADD, 5, 2, 3));          // now in read stage
    @(negedge clk);                            // execute
    @(negedge clk);                            // memory
    chk(mem_fwd[0].valid && mem_fwd[0].data == rfv(1, 2) + rfv(1, 3) && mem_fwd[0].rd == 5, "ALU result forwardable from memory stage");
    chk(!wb[0].valid, "not yet written");
    @(negedge clk);
    chk(wb[0].valid && wb[0].tid == 1 && wb[0].rd == 5 && wb[0].data == rfv(1, 2) + rfv(1, 3), "ALU write stage");
    @(negedge clk);
    chk(!wb[0].valid, "single result");

    // forwarding: two sources for rs1, lower index wins; rs2 from register file
    iss(0, alu(2, A_SUB, 6, 7, 8));
    fwd[1] = '{valid: 1, tid: 2, rd: 7, data: 32'd1000};
    fwd[2] = '{valid: 1, tid: 2, rd: 7, data: 32'd2000};
    fwd[0] = '{valid: 1, tid: 3, rd: 7, data: 32'd3000};   // other thread: ignored
    #1 chk(fwd_used[0], "forward used");
    @(negedge clk); fwd = '0;
    @(negedge clk); @(negedge clk);
    chk(wb[0].valid && wb[0].data == 32'd1000 - rfv(2, 8), "forwarded operand, youngest source");

    // taken branch predicted not taken: misprediction in memory stage
    u = alu(0, A_BEQ, -1, 4, 4); u.is_branch = 1; u.imm = 32'h40;
    iss(0, u);
    @(negedge clk);
    chk(!redirect[0].valid, "no redirect before memory stage");
    @(negedge clk);
    chk(redirect[0].valid && redirect[0].mispredict && redirect[0].npc == 32'h140 && redirect[0].tid == 0, "misprediction redirect");
    chk(bp_upd[0].valid && bp_upd[0].taken && bp_upd[0].target == 32'h140, "predictor update");
    @(negedge clk);
    // correctly predicted not-taken branch: no redirect
    u = alu(0, A_BNE, -1, 4, 4); u.is_branch = 1; u.imm = 32'h40;
    iss(0, u); @(negedge clk); @(negedge clk);
    chk(!redirect[0].valid && bp_upd[0].valid && !bp_upd[0].taken, "correct prediction");
    @(negedge clk);

    // undefined instruction
    u = alu(3, A_NONE, -1, 0, -1); u.illegal = 1; u.pc = 32'h208; u.pred_npc = 32'h20C;
    iss(0, u); @(negedge clk); @(negedge clk);
    chk(redirect[0].valid && redirect[0].exception && redirect[0].npc == VEC && redirect[0].epc == 32'h208, "exception");
    @(negedge clk);
    // halt
    u = alu(2, A_NONE, -1, 0, -1); u.is_halt = 1;
    iss(0, u); @(negedge clk); @(negedge clk);
    chk(redirect[0].valid && redirect[0].halt, "halt");
    @(negedge clk);

    // flush in the read stage and in the execute stage
    iss(0, alu(1, A_ADD, 9, 1, 1));
    flush = 4'b0010; @(negedge clk); flush = '0;
    iss(0, alu(1, A_ADD, 9, 1, 1));
    @(negedge clk); flush = 4'b0010; #1 flush = 4'b0010; @(negedge clk); flush = '0;
    repeat (3) begin
      chk(!wb[0].valid && !mem_fwd[0].valid, "flushed instruction leaves no result");
      @(negedge clk);
    end

    // multiplier lane
    u = alu(1, A_NONE, 3, 4, 5); u.fu = FU_MUL;
    iss(1, u); @(negedge clk); @(negedge clk);
    chk(!mem_fwd[1].valid, "multiplier result not forwarded from memory stage");
    @(negedge clk);
    chk(wb[1].valid && wb[1].data == rfv(1, 4) * rfv(1, 5), "product");

    // load/store lane
    u = alu(2, A_NONE, 6, 7, -1); u.fu = FU_LSU; u.is_load = 1; u.imm = 32'h24;
    iss(2, u); @(negedge clk); @(negedge clk);
    chk(dc_valid[2] && !dc_we[2] && dc_addr[2] == rfv(2, 7) + 32'h24, "load request");
    @(negedge clk);
    chk(wb[2].valid && wb[2].rd == 6 && wb[2].data == ((rfv(2, 7) + 32'h24) ^ 32'h5A5A_0000), "load data");
    u = alu(0, A_NONE, -1, 1, 2); u.fu = FU_LSU; u.is_store = 1; u.imm = 32'h8;
    iss(2, u); @(negedge clk); @(negedge clk);
    chk(dc_valid[2] && dc_we[2] && dc_addr[2] == rfv(0, 1) + 8 && dc_wdata[2] == rfv(0, 2), "store request");
    @(negedge clk);
    chk(!wb[2].valid, "store writes no register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
