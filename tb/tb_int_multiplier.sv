// tb_int_multiplier: back-to-back random multiplications; each product must
// appear exactly one cycle after its operands and equal the low 32 bits of the
// full product.
module tb_int_multiplier;
  import smt_pkg::*;
  logic clk = 0, en;
  word_t a, b, prod;
  int checks = 0, failures = 0;

  int_multiplier dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t ea;
    en = 0; a = 0; b = 0;
    @(negedge clk);
    for (int it = 0; it < 1000; it++) begin
      automatic longint unsigned full;
      a = (it % 10 == 0) ? 32'hFFFF_FFFF : $urandom;
      b = (it % 7 == 0) ? 32'hFFFF_FFFF : $urandom;
      en = 1;
      full = longint'(a) * longint'(b);
      ea = full[31:0];
      @(negedge clk);
      checks++;
      if (prod != ea) begin failures++; $display("FAIL %h * %h = %h exp %h", a, b, prod, ea); end
    end
    // hold: with en low the product stays
    en = 0; a = 1; b = 1;
    @(negedge clk);
    checks++; if (prod != ea) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
