// scoreboard: the scoreboard array, one entry per register of every thread.
//
// An issued instruction registers itself in the entry of its destination
// register. The entry holds the number of cycles until the result can be
// forwarded to an instruction in the read stage: 1 for ALU results (taken from
// the memory stage), 2 for multiply and load results (taken from the write
// stage). The count goes down by one per cycle; a register is ready when its
// count is zero. A later writer simply overwrites the count, which is correct
// because each thread completes in order through equal-length lanes.
//
// Interface: NS set ports (valid, tid, reg, latency) at the clock edge;
// ready[T][NREG] combinational. Entries reset to ready. The scoreboard array
// follows the architecture; the countdown encoding is this design's own.
module scoreboard
  import smt_pkg::*;
#(
  parameter int T  = 4,
  parameter int NS = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NS-1:0]            set_valid,
  input  logic [NS-1:0][TIDW-1:0]  set_tid,
  input  reg_t [NS-1:0]            set_reg,
  input  logic [NS-1:0][1:0]       set_lat,
  output logic [T-1:0][NREG-1:0]   ready
);

  logic [1:0] cnt_q [T][NREG];

  always_comb
    for (int t = 0; t < T; t++)
      for (int r = 0; r < NREG; r++)
        ready[t][r] = cnt_q[t][r] == 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < T; t++)
        for (int r = 0; r < NREG; r++) cnt_q[t][r] <= '0;
    end else begin
      for (int t = 0; t < T; t++)
        for (int r = 0; r < NREG; r++)
          if (cnt_q[t][r] != 2'd0) cnt_q[t][r] <= cnt_q[t][r] - 2'd1;
      for (int s = 0; s < NS; s++)
        if (set_valid[s] && int'(set_tid[s]) < T)
          cnt_q[int'(set_tid[s]) % T][set_reg[s]] <= set_lat[s];
    end
  end

endmodule
