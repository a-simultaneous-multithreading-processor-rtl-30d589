// register_file: the register sets of all T threads in one array, with NRP
// combinational read ports and NWP write ports, shared by all threads.
//
// A port addresses a register by thread id and register number. Writes happen
// at the clock edge, in port order; two writes to the same register in one
// cycle do not occur in the core because each thread completes in order and a
// thread never issues two writers of one register in the same cycle. A read in
// the cycle of a write returns the old value; the core forwards the value being
// written instead. Registers reset to zero.
// One set per thread (T times the registers of a single-thread core) follows
// the architecture; the port counts are the core's lane count.
module register_file
  import smt_pkg::*;
#(
  parameter int T   = 4,
  parameter int NRP = 14,
  parameter int NWP = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NRP-1:0][TIDW-1:0]  rd_tid,
  input  reg_t [NRP-1:0]            rd_reg,
  output word_t [NRP-1:0]           rd_data,
  input  result_t [NWP-1:0]         wr
);

  word_t regs [T][NREG];

  always_comb
    for (int p = 0; p < NRP; p++)
      rd_data[p] = (int'(rd_tid[p]) < T) ? regs[int'(rd_tid[p]) % T][rd_reg[p]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < T; t++)
        for (int r = 0; r < NREG; r++) regs[t][r] <= '0;
    end else begin
      for (int p = 0; p < NWP; p++)
        if (wr[p].valid && int'(wr[p].tid) < T)
          regs[int'(wr[p].tid) % T][wr[p].rd] <= wr[p].data;
    end
  end

endmodule
