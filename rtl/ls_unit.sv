// ls_unit: load/store unit of one functional-unit lane.
//
// Execute stage: the memory address is the base register plus the immediate;
// address, store data and the kind of access are registered. Memory stage: the
// registered access is presented to the data cache port; a load's data comes
// back in the same cycle and becomes the lane's result, a store is written at
// the end of the cycle. A flush of the instruction before the memory stage is
// handled by the lane (kill). Address calculation in the execute stage and the
// cache access in the memory stage follow the architecture's pipeline.
module ls_unit
  import smt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // execute stage
  input  logic  ex_valid,
  input  logic  ex_load,
  input  logic  ex_store,
  input  word_t ex_base,
  input  word_t ex_imm,
  input  word_t ex_sdata,
  input  logic  kill,        // the instruction now in the execute stage is flushed
  // memory stage: data cache port
  output logic  dc_valid,
  output logic  dc_we,
  output word_t dc_addr,
  output word_t dc_wdata,
  input  word_t dc_rdata,
  output word_t load_data
);

  logic  valid_q, store_q;
  word_t addr_q, sdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      store_q <= 1'b0;
      addr_q  <= '0;
      sdata_q <= '0;
    end else begin
      valid_q <= ex_valid && (ex_load || ex_store) && !kill;
      store_q <= ex_store;
      addr_q  <= ex_base + ex_imm;
      sdata_q <= ex_sdata;
    end
  end

  assign dc_valid  = valid_q;
  assign dc_we     = valid_q && store_q;
  assign dc_addr   = addr_q;
  assign dc_wdata  = sdata_q;
  assign load_data = dc_rdata;

endmodule
