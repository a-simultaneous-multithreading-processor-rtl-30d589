// issue_queue: the compressing instruction issue queue shared by all threads.
//
// Entry 0 is the oldest. Because instructions of different threads leave the
// queue out of fetch order, and because a thread can be flushed, holes appear
// between the head and the tail. Every cycle the queue is compressed: the
// entries that stay (not issued this cycle, not of a flushed thread) slide down
// in age order to fill the holes, and the newly decoded instructions are
// appended behind them in program order. Age order is therefore also program
// order within each thread.
//
// Interface: ins_valid/ins_uop (N per cycle, from decode), issue[L] (entries
// leaving this cycle), flush[T]. Outputs the whole queue (valid, uop) and the
// number of free entries at the start of the cycle. Compression follows the
// architecture; doing it in one cycle with a prefix count is this design's own.
module issue_queue
  import smt_pkg::*;
#(
  parameter int T = 4,
  parameter int N = 4,
  parameter int L = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            ins_valid,
  input  uop_t [N-1:0]            ins_uop,
  input  logic [L-1:0]            issue,
  input  logic [T-1:0]            flush,
  output logic [L-1:0]            valid,
  output uop_t [L-1:0]            uop,
  output logic [$clog2(L+1)-1:0]  free_cnt
);

  logic [L-1:0] valid_q;
  uop_t [L-1:0] uop_q;

  assign valid = valid_q;
  assign uop   = uop_q;

  always_comb begin
    automatic int n = 0;
    for (int e = 0; e < L; e++) n += int'(valid_q[e]);
    free_cnt = ($clog2(L+1))'(L - n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      uop_q   <= '0;
    end else begin
      automatic int w = 0;
      automatic logic [L-1:0] nv = '0;
      automatic uop_t [L-1:0] nu = uop_q;
      for (int e = 0; e < L; e++)
        if (valid_q[e] && !issue[e] && !flush[int'(uop_q[e].tid) % T]) begin
          nv[w] = 1'b1;
          nu[w] = uop_q[e];
          w++;
        end
      for (int i = 0; i < N; i++)
        if (ins_valid[i] && !flush[int'(ins_uop[i].tid) % T] && w < L) begin
          nv[w] = 1'b1;
          nu[w] = ins_uop[i];
          w++;
        end
      valid_q <= nv;
      uop_q   <= nu;
    end
  end

endmodule
