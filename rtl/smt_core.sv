// smt_core: a simultaneous multithreading processor built from an in-order
// superscalar pipeline with few additions.
//
// T hardware threads share one fetch unit, one fetch queue, one decoder, one
// compressing issue queue, the register-file ports, NUM_ALU ALUs, NUM_MUL
// multipliers, NUM_LSU load/store units and the caches. Every instruction
// carries its thread id. Within a thread, instructions issue and complete in
// program order, checked by a per-thread scoreboard; instructions of different
// threads issue in any order relative to each other, so one cycle can issue
// instructions of several threads. A branch misprediction, an exception or a
// halt is resolved in the memory stage and flushes only the younger
// instructions of that thread (fetch stage, fetch queue, issue queue, read and
// execute stages) and redirects its program counter.
//
// Pipeline: select | fetch | decode | issue | read | execute | memory | write.
//
// Interface: programs are loaded through imem_*, data through dmem_*; start
// (one cycle) loads start_pc into the PCs of the threads in thread_en. A thread
// runs until it executes HALT (thread_active goes low). dbg_* reads a register
// of any thread. The ev_* outputs report, per cycle, what the pipeline did.
// The block structure, the stage list, the per-thread in-order policies and the
// round-robin fetch / fewest-in-flight issue priorities follow the architecture;
// sizes not fixed by it (queues, predictor tables) and the instruction encoding
// are this design's own.
module smt_core
  import smt_pkg::*;
#(
  parameter int    T        = 4,
  parameter int    N        = 4,    // fetch width (instructions per cycle)
  parameter int    M        = 2,    // threads fetched per cycle
  parameter int    K        = 16,   // fetch queue entries
  parameter int    L        = 16,   // issue queue entries
  parameter int    ISSUE_W  = 4,
  parameter int    NUM_ALU  = 4,
  parameter int    NUM_MUL  = 1,
  parameter int    NUM_LSU  = 2,
  parameter int    IWORDS   = 1024,
  parameter int    DWORDS   = 1024,
  parameter word_t EXC_VEC  = 32'h0000_0F00
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [T-1:0]         thread_en,
  input  word_t [T-1:0]        start_pc,
  input  logic                 imem_we,
  input  word_t                imem_addr,
  input  word_t                imem_wdata,
  input  logic                 dmem_we,
  input  word_t                dmem_addr,
  input  word_t                dmem_wdata,
  output word_t                dmem_rdata,
  input  logic [TIDW-1:0]      dbg_tid,
  input  reg_t                 dbg_reg,
  output word_t                dbg_rdata,
  output logic [T-1:0]         thread_active,
  output word_t [T-1:0]        epc,
  output logic [$clog2(ISSUE_W+1)-1:0] ev_issued,
  output logic [T-1:0]         ev_issue_threads,  // threads that issued this cycle
  output logic [3:0]           ev_retired,
  output logic                 ev_mispredict,
  output logic                 ev_exception,
  output logic                 ev_halt,
  output logic                 ev_dep_stall,
  output logic                 ev_res_stall,
  output logic                 ev_fq_full,
  output logic                 ev_iq_hole,        // issue queue compressed a hole
  output logic [T-1:0]         ev_fetch_threads,  // threads fetched this cycle
  output logic                 ev_forward,
  output logic                 ev_icache_wait     // some thread waits for an instruction-cache refill
);

  localparam int FPT   = N / M;
  localparam int NLANE = NUM_ALU + NUM_MUL + NUM_LSU;
  localparam int NF    = NUM_ALU + NLANE;   // mem-stage ALU results + write-stage results
  localparam int CW    = $clog2(3 * NLANE + 1);   // per-thread count of instructions in the lanes

  // ---------------- fetch ----------------
  logic [T-1:0]           flush;
  redirect_t [NLANE-1:0]  redirect;
  bp_update_t [NLANE-1:0] bp_upd;
  logic [M-1:0]           ic_rd_en;
  word_t [M-1:0]          ic_rd_addr;
  word_t [M-1:0][FPT-1:0] ic_rd_data;
  logic [M-1:0]           ic_rd_hit;
  logic                   ic_refill_done;
  logic [T-1:0]           ic_wait;
  logic [N-1:0]           fe_valid;
  fetch_entry_t [N-1:0]   fe_entry;
  logic                   fq_room;
  logic [$clog2(K+1)-1:0] fq_count, fq_free;

  assign fq_room = int'(fq_free) >= 2 * N;

  fetch_unit #(.T(T), .N(N), .M(M), .NR(NLANE), .NU(NLANE)) u_fetch (
    .clk, .rst_n, .start, .thread_en, .start_pc, .fq_room, .redirect, .bp_upd,
    .ic_rd_en, .ic_rd_addr, .ic_rd_data, .ic_rd_hit, .ic_refill_done, .fe_valid, .fe_entry, .thread_active,
    .epc, .flush_mask(flush), .ic_wait
  );

  icache #(.M(M), .FPT(FPT), .WORDS(IWORDS)) u_icache (
    .clk, .rst_n, .rd_en(ic_rd_en), .rd_addr(ic_rd_addr), .rd_data(ic_rd_data),
    .rd_hit(ic_rd_hit), .refill_done(ic_refill_done),
    .wr_en(imem_we), .wr_addr(imem_addr), .wr_data(imem_wdata)
  );

  // ---------------- fetch queue and decode ----------------
  logic [N-1:0]            fq_occ, fq_valid;
  fetch_entry_t [N-1:0]    fq_entry;
  logic [$clog2(N+1)-1:0]  fq_rd_n;
  logic [N-1:0]            ins_valid;
  uop_t [N-1:0]            ins_uop;
  logic [$clog2(L+1)-1:0]  iq_free;

  fetch_queue #(.T(T), .N(N), .K(K)) u_fq (
    .clk, .rst_n, .wr_valid(fe_valid), .wr_entry(fe_entry), .rd_n(fq_rd_n), .flush,
    .head_occ(fq_occ), .head_valid(fq_valid), .head_entry(fq_entry),
    .count(fq_count), .free_cnt(fq_free)
  );

  decode_unit #(.T(T), .N(N), .L(L)) u_dec (
    .fq_occ, .fq_valid, .fq_entry, .iq_free, .flush, .rd_n(fq_rd_n), .ins_valid, .ins_uop
  );

  // ---------------- issue ----------------
  logic [L-1:0]                 iq_valid, iq_issue;
  uop_t [L-1:0]                 iq_uop;
  logic [T-1:0][NREG-1:0]       sb_ready;
  logic [T-1:0][CW-1:0]         inflight;
  logic [NLANE-1:0]             lane_valid;
  uop_t [NLANE-1:0]             lane_uop;
  logic [ISSUE_W-1:0]           sb_set;
  logic [ISSUE_W-1:0][TIDW-1:0] sb_tid;
  reg_t [ISSUE_W-1:0]           sb_reg;
  logic [ISSUE_W-1:0][1:0]      sb_lat;

  issue_queue #(.T(T), .N(N), .L(L)) u_iq (
    .clk, .rst_n, .ins_valid, .ins_uop, .issue(iq_issue), .flush,
    .valid(iq_valid), .uop(iq_uop), .free_cnt(iq_free)
  );

  scoreboard #(.T(T), .NS(ISSUE_W)) u_sb (
    .clk, .rst_n, .set_valid(sb_set), .set_tid(sb_tid), .set_reg(sb_reg),
    .set_lat(sb_lat), .ready(sb_ready)
  );

  issue_unit #(.T(T), .L(L), .ISSUE_W(ISSUE_W), .NUM_ALU(NUM_ALU), .NUM_MUL(NUM_MUL),
               .NUM_LSU(NUM_LSU), .CW(CW)) u_issue (
    .iq_valid, .iq_uop, .sb_ready, .inflight, .flush, .issue(iq_issue),
    .lane_valid, .lane_uop, .sb_set, .sb_tid, .sb_reg, .sb_lat,
    .dep_stall(ev_dep_stall), .res_stall(ev_res_stall)
  );

  // ---------------- register file, lanes, data cache ----------------
  logic [2*NLANE:0][TIDW-1:0] rf_tid;
  reg_t [2*NLANE:0]           rf_reg;
  word_t [2*NLANE:0]          rf_data;
  result_t [NLANE-1:0]        wb, mem_fwd;
  result_t [NF-1:0]           fwd;
  logic [NLANE-1:0][2:0]      occ_valid;
  logic [NLANE-1:0][2:0][TIDW-1:0] occ_tid;
  logic [NLANE-1:0]           fwd_used;
  logic [NUM_LSU-1:0]         dc_valid, dc_we;
  word_t [NUM_LSU-1:0]        dc_addr, dc_wdata, dc_rdata;

  register_file #(.T(T), .NRP(2*NLANE+1), .NWP(NLANE)) u_rf (
    .clk, .rst_n, .rd_tid(rf_tid), .rd_reg(rf_reg), .rd_data(rf_data), .wr(wb)
  );

  assign rf_tid[2*NLANE] = dbg_tid;
  assign rf_reg[2*NLANE] = dbg_reg;
  assign dbg_rdata       = rf_data[2*NLANE];

  // Forwarding sources, youngest first.
  always_comb begin
    for (int a = 0; a < NUM_ALU; a++) fwd[a] = mem_fwd[a];
    for (int l = 0; l < NLANE; l++)   fwd[NUM_ALU + l] = wb[l];
  end

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    localparam fu_e KIND = (l < NUM_ALU) ? FU_ALU : (l < NUM_ALU + NUM_MUL) ? FU_MUL : FU_LSU;
    logic  l_dc_valid, l_dc_we;
    word_t l_dc_addr, l_dc_wdata, l_dc_rdata;

    fu_lane #(.KIND(KIND), .T(T), .NF(NF), .EXC_VEC(EXC_VEC)) u_lane (
      .clk, .rst_n, .in_valid(lane_valid[l]), .in_uop(lane_uop[l]), .flush,
      .rf_tid(rf_tid[2*l +: 2]), .rf_reg(rf_reg[2*l +: 2]), .rf_data(rf_data[2*l +: 2]),
      .fwd, .mem_fwd(mem_fwd[l]), .wb(wb[l]), .redirect(redirect[l]), .bp_upd(bp_upd[l]),
      .dc_valid(l_dc_valid), .dc_we(l_dc_we), .dc_addr(l_dc_addr), .dc_wdata(l_dc_wdata),
      .dc_rdata(l_dc_rdata), .occ_valid(occ_valid[l]), .occ_tid(occ_tid[l]),
      .fwd_used(fwd_used[l])
    );

    if (KIND == FU_LSU) begin : g_dc
      localparam int P = l - NUM_ALU - NUM_MUL;
      assign dc_valid[P] = l_dc_valid;
      assign dc_we[P]    = l_dc_we;
      assign dc_addr[P]  = l_dc_addr;
      assign dc_wdata[P] = l_dc_wdata;
      assign l_dc_rdata  = dc_rdata[P];
    end else begin : g_nodc
      assign l_dc_rdata = '0;
    end
  end

  dcache #(.NP(NUM_LSU), .WORDS(DWORDS)) u_dcache (
    .clk, .valid(dc_valid), .we(dc_we), .addr(dc_addr), .wdata(dc_wdata), .rdata(dc_rdata),
    .dbg_we(dmem_we), .dbg_addr(dmem_addr), .dbg_wdata(dmem_wdata), .dbg_rdata(dmem_rdata)
  );

  // Instructions of each thread in the functional units (issue priority).
  always_comb begin
    inflight = '0;
    for (int l = 0; l < NLANE; l++)
      for (int s = 0; s < 3; s++)
        if (occ_valid[l][s] && int'(occ_tid[l][s]) < T)
          inflight[int'(occ_tid[l][s]) % T] = inflight[int'(occ_tid[l][s]) % T] + 1'b1;
  end

  // ---------------- events ----------------
  always_comb begin
    automatic logic seen_hole = 1'b0;
    automatic logic gap = 1'b0;
    ev_issued        = '0;
    ev_issue_threads = '0;
    ev_retired       = '0;
    ev_mispredict    = 1'b0;
    ev_exception     = 1'b0;
    ev_halt          = 1'b0;
    for (int l = 0; l < NLANE; l++) begin
      if (lane_valid[l] && !flush[int'(lane_uop[l].tid) % T]) begin
        ev_issued = ev_issued + 1'b1;
        ev_issue_threads[int'(lane_uop[l].tid) % T] = 1'b1;
      end
      if (wb[l].valid) ev_retired = ev_retired + 1'b1;
      if (redirect[l].mispredict) ev_mispredict = 1'b1;
      if (redirect[l].exception)  ev_exception  = 1'b1;
      if (redirect[l].halt)       ev_halt       = 1'b1;
    end
    // A hole: an entry leaves while a younger one stays.
    for (int e = 0; e < L; e++) begin
      if (iq_valid[e] && iq_issue[e]) gap = 1'b1;
      else if (iq_valid[e] && gap) seen_hole = 1'b1;
    end
    ev_iq_hole = seen_hole;
    ev_fq_full = !fq_room && |thread_active;
    ev_fetch_threads = '0;
    for (int i = 0; i < N; i++)
      if (fe_valid[i] && int'(fe_entry[i].tid) < T) ev_fetch_threads[int'(fe_entry[i].tid) % T] = 1'b1;
    ev_forward = |fwd_used;
    ev_icache_wait = |ic_wait;
  end

endmodule
