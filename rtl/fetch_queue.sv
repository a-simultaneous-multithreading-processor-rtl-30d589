// fetch_queue: circular buffer of K fetched instructions shared by all threads.
//
// The fetch stage writes up to N instructions per cycle at the tail pointer
// (valid slots are packed, in slot order). The decode unit reads the N oldest
// entries at the head pointer and removes rd_n of them at the clock edge. A
// per-thread flush marks every entry of that thread as squashed: the entry stays
// in place until it reaches the head and is then dropped by the decoder
// (head_valid is low for it), so the pointers never jump.
//
// Interface: wr_valid/wr_entry (N slots), rd_n (0..N), flush[T].
// head_occ[i] says slot i holds an entry; head_valid[i] that it is live.
// count and free_cnt are the occupancy before this cycle's changes.
// The circular organisation with head and tail pointers follows the
// architecture; the squash-in-place flush is this design's own.
module fetch_queue
  import smt_pkg::*;
#(
  parameter int T = 4,
  parameter int N = 4,
  parameter int K = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          wr_valid,
  input  fetch_entry_t [N-1:0]  wr_entry,
  input  logic [$clog2(N+1)-1:0] rd_n,
  input  logic [T-1:0]          flush,
  output logic [N-1:0]          head_occ,
  output logic [N-1:0]          head_valid,
  output fetch_entry_t [N-1:0]  head_entry,
  output logic [$clog2(K+1)-1:0] count,
  output logic [$clog2(K+1)-1:0] free_cnt
);

  localparam int PW = $clog2(K);

  fetch_entry_t     mem   [K];
  logic [K-1:0]     live_q;
  logic [PW-1:0]    head_q, tail_q;
  logic [$clog2(K+1)-1:0] count_q;

  assign count    = count_q;
  assign free_cnt = ($clog2(K+1))'(K) - count_q;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      automatic logic [PW-1:0] idx = PW'((int'(head_q) + i) % K);
      head_occ[i]   = i < int'(count_q);
      head_valid[i] = head_occ[i] && live_q[idx] && !flush[int'(mem[idx].tid) % T];
      head_entry[i] = mem[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      live_q  <= '0;
    end else begin
      automatic int nw = 0;
      automatic int nr = int'(rd_n);
      for (int e = 0; e < K; e++)
        if (flush[int'(mem[e].tid) % T]) live_q[e] <= 1'b0;
      for (int i = 0; i < N; i++)
        if (wr_valid[i] && !flush[int'(wr_entry[i].tid) % T] && int'(count_q) - nr + nw < K) begin
          mem[(int'(tail_q) + nw) % K]    <= wr_entry[i];
          live_q[(int'(tail_q) + nw) % K] <= 1'b1;
          nw++;
        end
      if (nr > int'(count_q)) nr = int'(count_q);
      head_q  <= PW'((int'(head_q) + nr) % K);
      tail_q  <= PW'((int'(tail_q) + nw) % K);
      count_q <= ($clog2(K+1))'(int'(count_q) + nw - nr);
    end
  end

endmodule
