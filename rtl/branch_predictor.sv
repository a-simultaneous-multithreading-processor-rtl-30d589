// branch_predictor: branch target buffer whose entries carry a thread id, plus a
// separate branch history table for each thread.
//
// Lookup (combinational, NL ports): a branch is predicted taken when the
// direct-mapped BTB holds an entry for the same thread and PC, and the
// thread's 2-bit saturating counter for that PC is in a taken state
// (2 or 3). The predicted target is the BTB target.
// Update (NU ports, applied at the clock edge in port order): the owning
// thread's counter moves towards the outcome; a taken branch writes its target
// into the BTB together with its thread id.
//
// The thread-tagged BTB and per-thread history follow the architecture; the
// table sizes, the direct mapping and the 2-bit counters are this design's own.
// Counters reset to 1 (weakly not taken) and BTB entries to invalid.
module branch_predictor
  import smt_pkg::*;
#(
  parameter int T           = 4,
  parameter int NL          = 4,
  parameter int NU          = 4,
  parameter int BTB_ENTRIES = 64,
  parameter int BHT_ENTRIES = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NL-1:0][TIDW-1:0] lk_tid,
  input  word_t [NL-1:0]          lk_pc,
  output logic [NL-1:0]           lk_taken,
  output word_t [NL-1:0]          lk_target,
  input  bp_update_t [NU-1:0]     upd
);

  localparam int BI = $clog2(BTB_ENTRIES);
  localparam int HI = $clog2(BHT_ENTRIES);
  localparam int TAGW = XLEN - 2 - BI;

  typedef struct packed {
    logic            valid;
    logic [TIDW-1:0] tid;
    logic [TAGW-1:0] tag;
    word_t           target;
  } btb_entry_t;

  btb_entry_t btb [BTB_ENTRIES];
  logic [1:0] bht [T][BHT_ENTRIES];

  function automatic logic [BI-1:0] bidx(word_t pc);  return pc[2 +: BI];  endfunction
  function automatic logic [TAGW-1:0] btag(word_t pc); return pc[XLEN-1 -: TAGW]; endfunction
  function automatic logic [HI-1:0] hidx(word_t pc);  return pc[2 +: HI];  endfunction

  always_comb begin
    for (int i = 0; i < NL; i++) begin
      btb_entry_t e;
      e = btb[bidx(lk_pc[i])];
      lk_taken[i]  = e.valid && e.tid == lk_tid[i] && e.tag == btag(lk_pc[i]) &&
                     (int'(lk_tid[i]) < T) && bht[int'(lk_tid[i]) % T][hidx(lk_pc[i])][1];
      lk_target[i] = e.target;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BTB_ENTRIES; i++) btb[i] <= '0;
      for (int t = 0; t < T; t++)
        for (int i = 0; i < BHT_ENTRIES; i++) bht[t][i] <= 2'd1;
    end else begin
      for (int u = 0; u < NU; u++) begin
        if (upd[u].valid && int'(upd[u].tid) < T) begin
          automatic int t = int'(upd[u].tid) % T;
          automatic logic [1:0] c = bht[t][hidx(upd[u].pc)];
          if (upd[u].taken) begin
            if (c != 2'd3) bht[t][hidx(upd[u].pc)] <= c + 2'd1;
            btb[bidx(upd[u].pc)] <= '{valid: 1'b1, tid: upd[u].tid,
                                      tag: btag(upd[u].pc), target: upd[u].target};
          end else if (c != 2'd0) begin
            bht[t][hidx(upd[u].pc)] <= c - 2'd1;
          end
        end
      end
    end
  end

endmodule
