// fu_lane: one functional-unit lane: the register read buffer, the functional
// unit (ALU, multiplier or load/store unit, chosen by KIND) and the result
// buffers of the memory and write stages.
//
// Stages, one cycle each, after the issue stage:
//   read     operands come from the youngest matching forwarded result
//            (fwd, lower index = younger) or else from the register file.
//   execute  ALU operation and branch condition; first multiply step;
//            load/store address.
//   memory   second multiply step; data cache access; branch misprediction
//            check (actual next PC against the predicted one), undefined
//            instruction exception and halt, each raising a redirect that
//            flushes the younger instructions of the thread.
//   write    result to the register file.
// An ALU result is forwardable from the memory stage (mem_fwd), every result
// from the write stage (wb). Instructions in the read and execute stages are
// dropped when their thread is flushed in that cycle; the memory stage never
// holds a younger instruction of a flushing thread (see issue_unit).
// All lanes have the same length, so each thread writes back in order.
// The stage split follows the architecture; the forwarding points and the
// redirect format are this design's own.
module fu_lane
  import smt_pkg::*;
#(
  parameter fu_e   KIND    = FU_ALU,
  parameter int    T       = 4,
  parameter int    NF      = 11,
  parameter word_t EXC_VEC = 32'h0000_0F00
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  uop_t                in_uop,
  input  logic [T-1:0]        flush,
  // register file read ports (read stage)
  output logic [1:0][TIDW-1:0] rf_tid,
  output reg_t [1:0]          rf_reg,
  input  word_t [1:0]         rf_data,
  // forwarding network
  input  result_t [NF-1:0]    fwd,
  output result_t             mem_fwd,
  output result_t             wb,
  // memory-stage outcomes
  output redirect_t           redirect,
  output bp_update_t          bp_upd,
  // data cache port (load/store lanes)
  output logic                dc_valid,
  output logic                dc_we,
  output word_t               dc_addr,
  output word_t               dc_wdata,
  input  word_t               dc_rdata,
  // occupancy of read, execute and memory stages
  output logic [2:0]          occ_valid,
  output logic [2:0][TIDW-1:0] occ_tid,
  output logic                fwd_used     // a read-stage operand came from forwarding
);

  typedef struct packed {
    logic  valid;
    uop_t  u;
    word_t a;
    word_t b;
  } ex_t;

  typedef struct packed {
    logic  valid;
    uop_t  u;
    word_t res;
    logic  taken;
    word_t target;
  } mem_t;

  logic    rd_valid_q;
  uop_t    rd_uop_q;
  ex_t     ex_q;
  mem_t    mem_q;
  result_t wb_q;

  function automatic logic killed(logic [T-1:0] f, logic [TIDW-1:0] tid);
    return f[int'(tid) % T];
  endfunction

  // ---------------- read stage ----------------
  word_t op_a, op_b;

  assign rf_tid = {rd_uop_q.tid, rd_uop_q.tid};
  assign rf_reg = {rd_uop_q.rs2, rd_uop_q.rs1};

  always_comb begin
    logic fa, fb;
    fa = 1'b0;
    fb = 1'b0;
    op_a = rf_data[0];
    op_b = rf_data[1];
    for (int s = 0; s < NF; s++) begin
      if (!fa && fwd[s].valid && fwd[s].tid == rd_uop_q.tid && fwd[s].rd == rd_uop_q.rs1) begin
        op_a = fwd[s].data;
        fa   = 1'b1;
      end
      if (!fb && fwd[s].valid && fwd[s].tid == rd_uop_q.tid && fwd[s].rd == rd_uop_q.rs2) begin
        op_b = fwd[s].data;
        fb   = 1'b1;
      end
    end
    fwd_used = rd_valid_q && ((fa && rd_uop_q.rs1_used) || (fb && rd_uop_q.rs2_used));
  end

  // ---------------- execute stage ----------------
  word_t alu_res, alu_target, mul_prod, ld_data;
  logic  alu_taken;

  int_alu u_alu (
    .op(ex_q.u.alu_op), .use_imm(!ex_q.u.rs2_used), .a(ex_q.a), .b(ex_q.b),
    .imm(ex_q.u.imm), .pc(ex_q.u.pc), .result(alu_res), .taken(alu_taken),
    .target(alu_target)
  );

  if (KIND == FU_MUL) begin : g_mul
    int_multiplier u_mul (.clk, .en(ex_q.valid), .a(ex_q.a), .b(ex_q.b), .prod(mul_prod));
  end else begin : g_nomul
    assign mul_prod = '0;
  end

  if (KIND == FU_LSU) begin : g_lsu
    ls_unit u_lsu (
      .clk, .rst_n, .ex_valid(ex_q.valid), .ex_load(ex_q.u.is_load), .ex_store(ex_q.u.is_store),
      .ex_base(ex_q.a), .ex_imm(ex_q.u.imm), .ex_sdata(ex_q.b),
      .kill(killed(flush, ex_q.u.tid)),
      .dc_valid, .dc_we, .dc_addr, .dc_wdata, .dc_rdata, .load_data(ld_data)
    );
  end else begin : g_nolsu
    assign dc_valid = 1'b0;
    assign dc_we    = 1'b0;
    assign dc_addr  = '0;
    assign dc_wdata = '0;
    assign ld_data  = '0;
  end

  // ---------------- memory stage ----------------
  word_t mem_result, actual_npc;

  always_comb begin
    case (KIND)
      FU_MUL:  mem_result = mul_prod;
      FU_LSU:  mem_result = ld_data;
      default: mem_result = mem_q.res;
    endcase
    actual_npc = (mem_q.u.is_branch && mem_q.taken) ? mem_q.target : mem_q.u.pc + 32'd4;

    redirect = '0;
    redirect.tid = mem_q.u.tid;
    redirect.epc = mem_q.u.pc;
    if (mem_q.valid) begin
      if (mem_q.u.illegal) begin
        redirect.valid     = 1'b1;
        redirect.exception = 1'b1;
        redirect.npc       = EXC_VEC;
      end else if (mem_q.u.is_halt) begin
        redirect.valid = 1'b1;
        redirect.halt  = 1'b1;
        redirect.npc   = actual_npc;
      end else if (actual_npc != mem_q.u.pred_npc) begin
        redirect.valid      = 1'b1;
        redirect.mispredict = 1'b1;
        redirect.npc        = actual_npc;
      end
    end

    bp_upd.valid  = mem_q.valid && mem_q.u.is_branch;
    bp_upd.tid    = mem_q.u.tid;
    bp_upd.pc     = mem_q.u.pc;
    bp_upd.taken  = mem_q.taken;
    bp_upd.target = mem_q.target;

    mem_fwd.valid = (KIND == FU_ALU) && mem_q.valid && mem_q.u.rd_we;
    mem_fwd.tid   = mem_q.u.tid;
    mem_fwd.rd    = mem_q.u.rd;
    mem_fwd.data  = mem_q.res;
  end

  assign wb = wb_q;

  assign occ_valid = {mem_q.valid, ex_q.valid, rd_valid_q};
  assign occ_tid   = {mem_q.u.tid, ex_q.u.tid, rd_uop_q.tid};

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_q <= 1'b0;
      rd_uop_q   <= '0;
      ex_q       <= '0;
      mem_q      <= '0;
      wb_q       <= '0;
    end else begin
      rd_valid_q   <= in_valid && !killed(flush, in_uop.tid);
      rd_uop_q     <= in_uop;
      ex_q.valid   <= rd_valid_q && !killed(flush, rd_uop_q.tid);
      ex_q.u       <= rd_uop_q;
      ex_q.a       <= op_a;
      ex_q.b       <= op_b;
      mem_q.valid  <= ex_q.valid && !killed(flush, ex_q.u.tid);
      mem_q.u      <= ex_q.u;
      mem_q.res    <= alu_res;
      mem_q.taken  <= alu_taken;
      mem_q.target <= alu_target;
      wb_q.valid   <= mem_q.valid && mem_q.u.rd_we;
      wb_q.tid     <= mem_q.u.tid;
      wb_q.rd      <= mem_q.u.rd;
      wb_q.data    <= mem_result;
    end
  end

endmodule
