// thread_selector: picks, every cycle, up to M of the T hardware threads from
// which the fetch unit fetches in the next cycle (the select stage).
//
// Selection is round-robin, the fetch priority policy used for the evaluated
// configurations: starting at a rotating pointer, the first M eligible threads
// are chosen in thread order and the pointer moves to the thread after the last
// one chosen. A thread is eligible when it is running, not being flushed and
// the fetch queue has room (decided by the caller).
//
// Interface: eligible[T] in; sel_valid[M], sel_tid[M] out, combinational from
// eligible and the pointer. advance (registered) moves the pointer when the
// selection is used. Slot i always holds a lower rotation distance than slot i+1.
module thread_selector #(
  parameter int T    = 4,
  parameter int M    = 2,
  parameter int TIDW = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [T-1:0]              eligible,
  input  logic                      advance,
  output logic [M-1:0]              sel_valid,
  output logic [M-1:0][TIDW-1:0]    sel_tid
);

  logic [TIDW-1:0] ptr_q, ptr_d;

  always_comb begin
    int unsigned n;
    int unsigned t;
    sel_valid = '0;
    sel_tid   = '0;
    ptr_d     = ptr_q;
    n = 0;
    for (int unsigned k = 0; k < T; k++) begin
      t = (int'(ptr_q) + k) % T;
      if (eligible[t] && n < M) begin
        sel_valid[n] = 1'b1;
        sel_tid[n]   = TIDW'(t);
        ptr_d        = TIDW'((t + 1) % T);
        n++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ptr_q <= '0;
    else if (advance) ptr_q <= ptr_d;
  end

endmodule
