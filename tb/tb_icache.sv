// tb_icache: loads random words into the instruction store, then reads
// blocks on both ports. Checks: a cold block misses; refill_done pulses
// MISS_LAT cycles after the miss is reported, and the block then
// hits with the stored words (N/M consecutive words, one cycle after the
// address); a port keeps hitting while a refill for the other is in flight;
// a block straddling two lines needs both; a store write drops its line.
module tb_icache;
  import smt_pkg::*;
  localparam int M = 2, FPT = 2, WORDS = 256, LINE_WORDS = 4, SETS = 16, MISS_LAT = 6;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] rd_en, rd_hit;
  word_t [M-1:0] rd_addr;
  word_t [M-1:0][FPT-1:0] rd_data;
  logic refill_done;
  logic wr_en; word_t wr_addr, wr_data;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  icache #(.M(M), .FPT(FPT), .WORDS(WORDS), .LINE_WORDS(LINE_WORDS), .SETS(SETS), .MISS_LAT(MISS_LAT)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // Read one block on port p; returns hit and checks the data on a hit.
  task automatic rd(int p, int w, output bit hit);
    rd_en = '0; rd_en[p] = 1; rd_addr[p] = word_t'(4*w);
    @(negedge clk);
    rd_en = '0;
    hit = rd_hit[p];
    if (hit) for (int k = 0; k < FPT; k++)
      chk(rd_data[p][k] == model[(w+k)%WORDS], $sformatf("data word %0d", w+k));
  endtask

  // Wait for refill_done; returns the number of cycles waited.
  task automatic wait_refill(output int n);
    n = 0;
    while (!refill_done && n < 50) begin @(negedge clk); n++; end
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit h; int n;
    rd_en = '0; rd_addr = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom; wr_en = 1; wr_addr = word_t'(4*i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 0;
    // cold miss, refill latency, then hit
    rd(0, 8, h); chk(!h, "cold miss");
    wait_refill(n); chk(n == MISS_LAT, $sformatf("refill done %0d cycles after the miss result", n));
    rd(0, 8, h); chk(h, "hit after refill");
    rd(1, 10, h); chk(h, "other port hits the same line");
    // non-blocking: port 1 misses, port 0 keeps hitting during the refill
    rd(1, 40, h); chk(!h, "port 1 misses");
    for (int i = 0; i < 3; i++) begin rd(0, 9, h); chk(h, "port 0 hits during the refill"); end
    wait_refill(n);
    rd(1, 40, h); chk(h, "port 1 hits after its refill");
    // block crossing a line boundary: words 43 and 44 (second line cold)
    rd(0, 43, h); chk(!h, "straddling block misses on its second line");
    wait_refill(n);
    rd(0, 43, h); chk(h, "straddling block hits");
    // conflict: word 8 + SETS*LINE_WORDS maps to the same set and evicts the line
    rd(0, 8 + SETS*LINE_WORDS, h); chk(!h, "conflicting line misses");
    wait_refill(n);
    rd(0, 8 + SETS*LINE_WORDS, h); chk(h, "conflicting line hits");
    rd(0, 8, h); chk(!h, "evicted line misses");
    wait_refill(n);
    // write drops the line
    wr_en = 1; wr_addr = 32'd36; wr_data = 32'h1234_5678; model[9] = wr_data;
    @(negedge clk); wr_en = 0;
    rd(0, 8, h); chk(!h, "written line dropped");
    wait_refill(n);
    rd(0, 8, h); chk(h, "new word after refill");
    // random sweep over the whole store, every block eventually hits with the right data
    for (int it = 0; it < 200; it++) begin
      automatic int w = $urandom % (WORDS - FPT);
      rd(it % 2, w, h);
      if (!h) begin wait_refill(n); rd(it % 2, w, h); if (!h) begin wait_refill(n); rd(it % 2, w, h); end end
      chk(h, "block eventually hits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
