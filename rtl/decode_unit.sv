// decode_unit: the decode stage. Takes up to N instructions in order from the
// head of the fetch queue, decodes them with N decoders and hands the live ones
// to the instruction issue queue in the same cycle.
//
// Instructions of a thread flushed in the fetch queue are consumed and dropped.
// The number taken (rd_n) is the number of occupied head slots, cut so that the
// instructions that will be inserted fit in the issue queue's free space as it
// is at the start of the cycle; the cut keeps program order. Combinational.
module decode_unit
  import smt_pkg::*;
#(
  parameter int T = 4,
  parameter int N = 4,
  parameter int L = 16
) (
  input  logic [N-1:0]            fq_occ,
  input  logic [N-1:0]            fq_valid,
  input  fetch_entry_t [N-1:0]    fq_entry,
  input  logic [$clog2(L+1)-1:0]  iq_free,
  input  logic [T-1:0]            flush,
  output logic [$clog2(N+1)-1:0]  rd_n,
  output logic [N-1:0]            ins_valid,
  output uop_t [N-1:0]            ins_uop
);

  uop_t [N-1:0] dec;

  for (genvar i = 0; i < N; i++) begin : g_dec
    decoder u_dec (.fe(fq_entry[i]), .uop(dec[i]));
  end

  always_comb begin
    automatic int used = 0;
    automatic logic stop = 1'b0;
    rd_n      = '0;
    ins_valid = '0;
    ins_uop   = dec;
    for (int i = 0; i < N; i++) begin
      if (!stop && fq_occ[i]) begin
        if (fq_valid[i]) begin
          if (used < int'(iq_free)) begin
            ins_valid[i] = !flush[int'(fq_entry[i].tid) % T];
            used++;
            rd_n = rd_n + 1'b1;
          end else begin
            stop = 1'b1;
          end
        end else begin
          rd_n = rd_n + 1'b1;   // squashed entry: drop it
        end
      end
    end
  end

endmodule
