// dcache: data memory with NP ports, one per load/store unit.
//
// The architecture shares one non-blocking data cache (behind a data TLB)
// between the load/store units and its evaluation assumes no bank conflicts.
// This model keeps the port structure and holds all data on chip, so every
// access hits in one cycle: a read returns its word combinationally in the
// memory stage, a write takes effect at the clock edge (ports in order). The
// miss path, the TLB and the backing memory are not modelled. An extra port
// (dbg_*) loads data and reads it back for test. Byte addresses, word access.
module dcache
  import smt_pkg::*;
#(
  parameter int NP    = 2,
  parameter int WORDS = 1024
) (
  input  logic             clk,
  input  logic [NP-1:0]    valid,
  input  logic [NP-1:0]    we,
  input  word_t [NP-1:0]   addr,
  input  word_t [NP-1:0]   wdata,
  output word_t [NP-1:0]   rdata,
  input  logic             dbg_we,
  input  word_t            dbg_addr,
  input  word_t            dbg_wdata,
  output word_t            dbg_rdata
);

  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_comb begin
    for (int p = 0; p < NP; p++) rdata[p] = mem[addr[p][2 +: AW]];
    dbg_rdata = mem[dbg_addr[2 +: AW]];
  end

  always_ff @(posedge clk) begin
    if (dbg_we) mem[dbg_addr[2 +: AW]] <= dbg_wdata;
    for (int p = 0; p < NP; p++)
      if (valid[p] && we[p]) mem[addr[p][2 +: AW]] <= wdata[p];
  end

endmodule
