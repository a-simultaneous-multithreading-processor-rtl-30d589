// icache: non-blocking instruction cache with M read ports, each returning a
// block of FPT = N/M consecutive instructions, so M threads fetch in one cycle.
//
// Organisation (this design's own; the architecture fixes only the M ports,
// the non-blocking behaviour and the absence of bank conflicts): direct-mapped,
// SETS lines of LINE_WORDS words, in front of a WORDS-word instruction store.
// Every port can read every line in the same cycle, so there are no bank
// conflicts.
//
// Timing: the addresses are taken at the clock edge (select stage); in the
// next cycle (fetch stage) each port gives its block and rd_hit, which is low
// unless every word of the block was present. A miss does not stall the
// cache: other ports and later cycles keep hitting. One refill at a time is in
// flight: the first missing line seen while the refill engine is idle is
// fetched from the store in MISS_LAT cycles, written whole, and refill_done
// pulses for one cycle after it. A thread that missed waits for a refill_done
// and then tries again (the fetch unit does this).
// The write port loads the instruction store and drops the line it falls in.
// Byte addresses; the two low bits are ignored. Lines reset to invalid.
module icache
  import smt_pkg::*;
#(
  parameter int M          = 2,
  parameter int FPT        = 2,
  parameter int WORDS      = 1024,
  parameter int LINE_WORDS = 4,
  parameter int SETS       = 64,
  parameter int MISS_LAT   = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [M-1:0]              rd_en,
  input  word_t [M-1:0]             rd_addr,
  output word_t [M-1:0][FPT-1:0]    rd_data,
  output logic [M-1:0]              rd_hit,
  output logic                      refill_done,
  input  logic                      wr_en,
  input  word_t                     wr_addr,
  input  word_t                     wr_data
);

  localparam int AW   = $clog2(WORDS);
  localparam int OW   = $clog2(LINE_WORDS);
  localparam int SW   = $clog2(SETS);
  localparam int TW   = AW - OW - SW;
  localparam int LW   = AW - OW;            // line address width
  localparam int CW   = $clog2(MISS_LAT + 1);

  word_t          store [WORDS];
  word_t          data  [SETS][LINE_WORDS];
  logic [TW-1:0]  tag   [SETS];
  logic [SETS-1:0] valid;

  logic           busy_q;
  logic [LW-1:0]  line_q;
  logic [CW-1:0]  cnt_q;

  function automatic logic [AW-1:0] waddr(word_t a, int k);
    return AW'(a[2 +: AW] + AW'(k));
  endfunction
  function automatic logic [SW-1:0] set_of(logic [AW-1:0] w);
    return w[OW +: SW];
  endfunction
  function automatic logic [TW-1:0] tag_of(logic [AW-1:0] w);
    return w[AW-1 -: TW];
  endfunction

  // Hit and first missing line of every port (select stage).
  logic [M-1:0]          hit_now;
  logic                  miss_seen;
  logic [LW-1:0]         miss_line;

  always_comb begin
    miss_seen = 1'b0;
    miss_line = '0;
    for (int p = 0; p < M; p++) begin
      hit_now[p] = 1'b1;
      for (int k = 0; k < FPT; k++) begin
        automatic logic [AW-1:0] w = waddr(rd_addr[p], k);
        if (!(valid[set_of(w)] && tag[set_of(w)] == tag_of(w))) begin
          hit_now[p] = 1'b0;
          if (rd_en[p] && !miss_seen) begin
            miss_seen = 1'b1;
            miss_line = w[AW-1:OW];
          end
        end
      end
    end
  end

  // Data path: block read, store writes, line fill.
  always_ff @(posedge clk) begin
    for (int p = 0; p < M; p++)
      for (int k = 0; k < FPT; k++) begin
        automatic logic [AW-1:0] w = waddr(rd_addr[p], k);
        rd_data[p][k] <= data[set_of(w)][w[OW-1:0]];
      end
    if (wr_en) store[wr_addr[2 +: AW]] <= wr_data;
    if (busy_q && cnt_q == '0)
      for (int i = 0; i < LINE_WORDS; i++) begin
        data[line_q[SW-1:0]][i] <= store[{line_q, OW'(i)}];
        tag[line_q[SW-1:0]]     <= line_q[LW-1 -: TW];
      end
  end

  // Control: valid bits, hit flags, refill engine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid       <= '0;
      rd_hit      <= '0;
      busy_q      <= 1'b0;
      line_q      <= '0;
      cnt_q       <= '0;
      refill_done <= 1'b0;
    end else begin
      rd_hit      <= rd_en & hit_now;
      refill_done <= 1'b0;
      if (busy_q) begin
        if (cnt_q == '0) begin
          valid[line_q[SW-1:0]] <= 1'b1;
          busy_q      <= 1'b0;
          refill_done <= 1'b1;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end else if (miss_seen) begin
        busy_q <= 1'b1;
        line_q <= miss_line;
        cnt_q  <= CW'(MISS_LAT - 1);
      end
      if (wr_en) valid[set_of(wr_addr[2 +: AW])] <= 1'b0;
    end
  end

endmodule
