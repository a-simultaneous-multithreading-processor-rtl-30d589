// fetch_unit: the select and fetch stages. Holds one program counter per
// hardware thread, the round-robin thread selector and the thread-tagged branch
// predictor, and drives the M ports of the instruction cache.
//
// Select stage: among the running threads that are not being flushed, the
// selector picks up to M when the fetch queue has room for two full fetch
// groups (the one in the fetch stage and the new one). For each picked thread
// the predictor is looked up for the FPT = N/M consecutive PCs of its block;
// the block ends after the first instruction predicted taken. The thread's PC
// moves at once to the predicted next PC, and the block address goes to the
// instruction cache.
// Fetch stage (next cycle): the cache returns the blocks; each slot is
// presented to the fetch queue with its thread, PC and predicted next PC.
// Slots of a thread flushed in this cycle are dropped. When a thread's block
// misses in the instruction cache, its slots are dropped, its PC goes back to
// the block's first PC and the thread sits out of selection until the cache
// reports a refill; the other threads keep fetching (non-blocking fetch).
//
// Redirects from the memory stage (misprediction, exception, halt) load the
// thread's PC; a halt clears the thread's running bit; an exception records the
// excepting PC. start (one cycle) loads start_pc and thread_en into the PCs and
// running bits. N instructions per cycle over M threads (N/M each) follows the
// architecture; the room rule, the block-ending rule and the start port are
// this design's own.
module fetch_unit
  import smt_pkg::*;
#(
  parameter int T      = 4,
  parameter int N      = 4,
  parameter int M      = 2,
  parameter int NR     = 7,   // redirect sources (functional-unit lanes)
  parameter int NU     = 4    // predictor update ports
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [T-1:0]                  thread_en,
  input  word_t [T-1:0]                 start_pc,
  input  logic                          fq_room,
  input  redirect_t [NR-1:0]            redirect,
  input  bp_update_t [NU-1:0]           bp_upd,
  output logic [M-1:0]                  ic_rd_en,
  output word_t [M-1:0]                 ic_rd_addr,
  input  word_t [M-1:0][N/M-1:0]        ic_rd_data,
  input  logic [M-1:0]                  ic_rd_hit,
  input  logic                          ic_refill_done,
  output logic [N-1:0]                  fe_valid,
  output fetch_entry_t [N-1:0]          fe_entry,
  output logic [T-1:0]                  thread_active,
  output word_t [T-1:0]                 epc,
  output logic [T-1:0]                  flush_mask,
  output logic [T-1:0]                  ic_wait      // threads waiting for an instruction-cache refill
);

  localparam int FPT = N / M;

  word_t  [T-1:0] pc_q;
  logic   [T-1:0] active_q;
  logic   [T-1:0] wait_q;      // missed in the instruction cache, waiting for a refill
  logic   [T-1:0] miss_now;    // missed in the fetch stage this cycle
  word_t  [T-1:0] epc_q;

  // ---------------- select stage ----------------
  logic [T-1:0]              eligible;
  logic [M-1:0]              sel_valid;
  logic [M-1:0][TIDW-1:0]    sel_tid;
  logic [N-1:0][TIDW-1:0]    lk_tid;
  word_t [N-1:0]             lk_pc;
  logic [N-1:0]              lk_taken;
  word_t [N-1:0]             lk_target;

  always_comb begin
    flush_mask = '0;
    for (int r = 0; r < NR; r++)
      if (redirect[r].valid && int'(redirect[r].tid) < T) flush_mask[int'(redirect[r].tid) % T] = 1'b1;
  end

  always_comb begin
    eligible = active_q & ~flush_mask & ~wait_q & ~miss_now & {T{fq_room}};
  end

  thread_selector #(.T(T), .M(M), .TIDW(TIDW)) u_sel (
    .clk, .rst_n, .eligible, .advance(1'b1), .sel_valid, .sel_tid
  );

  always_comb begin
    for (int p = 0; p < M; p++)
      for (int k = 0; k < FPT; k++) begin
        lk_tid[p*FPT+k] = sel_tid[p];
        lk_pc[p*FPT+k]  = pc_q[int'(sel_tid[p]) % T] + word_t'(4*k);
      end
  end

  branch_predictor #(.T(T), .NL(N), .NU(NU)) u_bp (
    .clk, .rst_n, .lk_tid, .lk_pc, .lk_taken, .lk_target, .upd(bp_upd)
  );

  // Block length and predicted next PC of every selected thread.
  logic  [M-1:0][FPT-1:0] blk_valid;
  word_t [M-1:0][FPT-1:0] blk_npc;
  word_t [M-1:0]          blk_next;

  always_comb begin
    for (int p = 0; p < M; p++) begin
      logic ended;
      ended = 1'b0;
      blk_next[p] = lk_pc[p*FPT] + word_t'(4*FPT);
      for (int k = 0; k < FPT; k++) begin
        blk_valid[p][k] = sel_valid[p] && !ended;
        blk_npc[p][k]   = lk_taken[p*FPT+k] ? lk_target[p*FPT+k] : lk_pc[p*FPT+k] + 32'd4;
        if (!ended && lk_taken[p*FPT+k]) begin
          ended = 1'b1;
          blk_next[p] = lk_target[p*FPT+k];
        end
      end
      ic_rd_en[p]   = sel_valid[p];
      ic_rd_addr[p] = lk_pc[p*FPT];
    end
  end

  // ---------------- fetch stage registers ----------------
  logic  [M-1:0][FPT-1:0] fs_valid;
  logic  [M-1:0][TIDW-1:0] fs_tid;
  word_t [M-1:0]           fs_pc;
  word_t [M-1:0][FPT-1:0]  fs_npc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_valid <= '0;
      fs_tid   <= '0;
      fs_pc    <= '0;
      fs_npc   <= '0;
    end else begin
      fs_valid <= blk_valid;
      fs_tid   <= sel_tid;
      fs_pc    <= ic_rd_addr;
      fs_npc   <= blk_npc;
    end
  end

  always_comb begin
    miss_now = '0;
    for (int p = 0; p < M; p++)
      if (fs_valid[p][0] && !ic_rd_hit[p] && !flush_mask[int'(fs_tid[p]) % T])
        miss_now[int'(fs_tid[p]) % T] = 1'b1;
  end

  always_comb begin
    for (int p = 0; p < M; p++)
      for (int k = 0; k < FPT; k++) begin
        fe_valid[p*FPT+k] = fs_valid[p][k] && ic_rd_hit[p] && !flush_mask[int'(fs_tid[p]) % T];
        fe_entry[p*FPT+k] = '{tid: fs_tid[p], pc: fs_pc[p] + word_t'(4*k),
                              instr: ic_rd_data[p][k], pred_npc: fs_npc[p][k]};
      end
  end

  // ---------------- program counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= '0;
      active_q <= '0;
      epc_q    <= '0;
      wait_q   <= '0;
    end else if (start) begin
      pc_q     <= start_pc;
      active_q <= thread_en;
      epc_q    <= '0;
      wait_q   <= '0;
    end else begin
      for (int p = 0; p < M; p++)
        if (sel_valid[p]) pc_q[int'(sel_tid[p]) % T] <= blk_next[p];
      // A missed block is fetched again from its first PC after the next refill.
      if (ic_refill_done) wait_q <= '0;
      for (int p = 0; p < M; p++)
        if (fs_valid[p][0] && !ic_rd_hit[p] && !flush_mask[int'(fs_tid[p]) % T]) begin
          pc_q[int'(fs_tid[p]) % T]   <= fs_pc[p];
          wait_q[int'(fs_tid[p]) % T] <= 1'b1;
        end
      for (int r = 0; r < NR; r++)
        if (redirect[r].valid && int'(redirect[r].tid) < T) begin
          pc_q[int'(redirect[r].tid) % T] <= redirect[r].npc;
          if (redirect[r].halt)      active_q[int'(redirect[r].tid) % T] <= 1'b0;
          if (redirect[r].exception) epc_q[int'(redirect[r].tid) % T]    <= redirect[r].epc;
        end
    end
  end

  assign thread_active = active_q;
  assign ic_wait       = wait_q;
  assign epc           = epc_q;

endmodule
