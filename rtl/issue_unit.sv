// issue_unit: the issue stage. Chooses, each cycle, up to ISSUE_W instructions
// from the issue queue and assigns each to a free functional-unit lane.
//
// Threads are served in priority order: the thread with the fewest instructions
// in the functional units (read, execute and memory stages) first, ties to the
// lower thread id. For each thread the queue is scanned from the oldest entry;
// its instructions issue in program order until the first one that cannot:
// a source register not ready in the scoreboard, a source or destination
// register written by an instruction of the same thread issued earlier in this
// cycle, no free lane of the needed kind, or the issue width used up. A branch,
// store, halt or undefined instruction is the last of its thread in a cycle, so
// a misprediction or exception never has a younger instruction of its thread in
// the same or an older stage, and a load never passes a store of its own thread
// in the memory stage. Instructions of a thread being flushed do not issue.
//
// Lanes: 0..NUM_ALU-1 are ALUs, then NUM_MUL multipliers, then NUM_LSU
// load/store units. Outputs one uop per lane, the issue mask of the queue and
// one scoreboard set per issued instruction. Combinational.
// Per-thread in-order issue, the scoreboard check and the issue priority by
// instructions in the functional units follow the architecture; the rules of
// the same-cycle group are this design's own.
module issue_unit
  import smt_pkg::*;
#(
  parameter int T       = 4,
  parameter int L       = 16,
  parameter int ISSUE_W = 4,
  parameter int NUM_ALU = 4,
  parameter int NUM_MUL = 1,
  parameter int NUM_LSU = 2,
  parameter int CW      = 4,
  localparam int NLANE  = NUM_ALU + NUM_MUL + NUM_LSU
) (
  input  logic [L-1:0]                  iq_valid,
  input  uop_t [L-1:0]                  iq_uop,
  input  logic [T-1:0][NREG-1:0]        sb_ready,
  input  logic [T-1:0][CW-1:0]          inflight,
  input  logic [T-1:0]                  flush,
  output logic [L-1:0]                  issue,
  output logic [NLANE-1:0]              lane_valid,
  output uop_t [NLANE-1:0]              lane_uop,
  output logic [ISSUE_W-1:0]            sb_set,
  output logic [ISSUE_W-1:0][TIDW-1:0]  sb_tid,
  output reg_t [ISSUE_W-1:0]            sb_reg,
  output logic [ISSUE_W-1:0][1:0]       sb_lat,
  output logic                          dep_stall,   // some thread held by a dependency
  output logic                          res_stall    // some thread held by a lane or the width
);

  always_comb begin
    automatic int order [T];
    automatic int n_issued = 0;
    automatic int alu_used = 0;
    automatic int mul_used = 0;
    automatic int lsu_used = 0;
    issue      = '0;
    lane_valid = '0;
    lane_uop   = '0;
    sb_set     = '0;
    sb_tid     = '0;
    sb_reg     = '0;
    sb_lat     = '0;
    dep_stall  = 1'b0;
    res_stall  = 1'b0;

    // Priority order: fewest instructions in the functional units first.
    for (int t = 0; t < T; t++) order[t] = t;
    for (int i = 0; i < T; i++)
      for (int j = 0; j < T - 1 - i; j++)
        if (inflight[order[j]] > inflight[order[j+1]]) begin
          automatic int tmp = order[j];
          order[j]   = order[j+1];
          order[j+1] = tmp;
        end

    for (int p = 0; p < T; p++) begin
      automatic int t = order[p];
      automatic logic blocked = flush[t];
      automatic logic [NREG-1:0] grp_dst = '0;
      for (int e = 0; e < L; e++) begin
        if (!blocked && iq_valid[e] && int'(iq_uop[e].tid) == t) begin
          automatic uop_t u = iq_uop[e];
          automatic logic dep_ok = 1'b1;
          automatic logic res_ok = 1'b0;
          automatic int lane = 0;
          if (u.rs1_used && (!sb_ready[t][u.rs1] || grp_dst[u.rs1])) dep_ok = 1'b0;
          if (u.rs2_used && (!sb_ready[t][u.rs2] || grp_dst[u.rs2])) dep_ok = 1'b0;
          if (u.rd_we && grp_dst[u.rd]) dep_ok = 1'b0;
          if (n_issued < ISSUE_W) begin
            case (u.fu)
              FU_MUL:  if (mul_used < NUM_MUL) begin res_ok = 1'b1; lane = NUM_ALU + mul_used; end
              FU_LSU:  if (lsu_used < NUM_LSU) begin res_ok = 1'b1; lane = NUM_ALU + NUM_MUL + lsu_used; end
              default: if (alu_used < NUM_ALU) begin res_ok = 1'b1; lane = alu_used; end
            endcase
          end
          if (!dep_ok) begin
            dep_stall = 1'b1;
            blocked   = 1'b1;
          end else if (!res_ok) begin
            res_stall = 1'b1;
            blocked   = 1'b1;
          end else begin
            issue[e]         = 1'b1;
            lane_valid[lane] = 1'b1;
            lane_uop[lane]   = u;
            case (u.fu)
              FU_MUL:  mul_used++;
              FU_LSU:  lsu_used++;
              default: alu_used++;
            endcase
            if (u.rd_we) begin
              grp_dst[u.rd]      = 1'b1;
              sb_set[n_issued]   = 1'b1;
              sb_tid[n_issued]   = u.tid;
              sb_reg[n_issued]   = u.rd;
              sb_lat[n_issued]   = (u.fu == FU_ALU) ? 2'd1 : 2'd2;
            end
            n_issued++;
            if (u.is_branch || u.is_store || u.is_halt || u.illegal) blocked = 1'b1;
          end
        end
      end
    end
  end

endmodule
