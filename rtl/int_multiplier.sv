// int_multiplier: two-stage integer multiplier (low 32 bits of the product).
//
// The execute stage forms two partial products, a * b[15:0] and a * b[31:16],
// and registers them; the memory stage adds them with the upper one shifted by
// 16. So the product is ready at the end of the memory stage, as the pipeline
// of the architecture splits multiplication over those two stages. The split
// into two 16-bit halves is this design's own.
// Interface: en/a/b in the execute stage; prod is valid in the next cycle.
module int_multiplier
  import smt_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  word_t a,
  input  word_t b,
  output word_t prod
);

  word_t p_lo_q, p_hi_q;

  always_ff @(posedge clk)
    if (en) begin
      p_lo_q <= a * {16'd0, b[15:0]};
      p_hi_q <= a * {16'd0, b[31:16]};
    end

  assign prod = p_lo_q + (p_hi_q << 16);

endmodule
