// tb_thread_selector: drives random eligibility masks into the round-robin
// selector and compares its picks with a reference that walks the threads from
// its own copy of the rotating pointer.
module tb_thread_selector;
  localparam int T = 4, M = 2, TIDW = 3;
  logic clk = 0, rst_n = 0, advance;
  logic [T-1:0] eligible;
  logic [M-1:0] sel_valid;
  logic [M-1:0][TIDW-1:0] sel_tid;
  int checks = 0, failures = 0;
  int ptr = 0;

  thread_selector #(.T(T), .M(M), .TIDW(TIDW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    eligible = '0; advance = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int n, exp_ptr;
      logic [M-1:0] ev;
      int et [M];
      n = 0; exp_ptr = ptr; ev = '0;
      eligible = T'($urandom);
      advance  = ($urandom % 4) != 0;
      for (int k = 0; k < T; k++) begin
        automatic int t = (ptr + k) % T;
        if (eligible[t] && n < M) begin ev[n] = 1; et[n] = t; n++; exp_ptr = (t + 1) % T; end
      end
      #1;
      checks++;
      if (sel_valid != ev) begin failures++; $display("FAIL valid %b exp %b", sel_valid, ev); end
      for (int i = 0; i < M; i++) if (ev[i]) begin
        checks++;
        if (int'(sel_tid[i]) != et[i]) begin failures++; $display("FAIL tid %0d exp %0d", sel_tid[i], et[i]); end
      end
      @(negedge clk);
      if (advance) ptr = exp_ptr;
    end
    // fairness: all threads eligible -> each thread picked equally often
    begin
      int cnt [T] = '{default: 0};
      eligible = '1; advance = 1;
      for (int it = 0; it < 40; it++) begin
        #1;
        for (int i = 0; i < M; i++) cnt[sel_tid[i]]++;
        @(negedge clk);
      end
      for (int t = 0; t < T; t++) begin checks++; if (cnt[t] != 20) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
