// lc4_data_mem: the data memory of the single-cycle LC4 datapath.
//
// One 16-bit word per address. The ALU result drives Data Address and RT
// drives Data Input. Data Output is a combinational read of the addressed
// word, so a load completes within its instruction's cycle. When DATA.WE is
// 1 the word at Data Address is replaced by Data Input on the rising clock
// edge that ends the cycle; DATA.WE is 1 only for a store.
//
// The address width follows the 16-bit datapath, so the default memory holds
// 2^16 words. Its contents are not reset (a memory array has no reset); a
// reader must write a location before relying on its value. Both choices
// belong to this implementation. Addresses wider than ADDR_W are truncated
// to their low ADDR_W bits.
module lc4_data_mem
  import lc4_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic  clk,
  input  logic  data_we,  // DATA.WE
  input  word_t addr,     // Data Address (ALU result)
  input  word_t wdata,    // Data Input (RT)
  output word_t rdata     // Data Output
);

  word_t mem [2**ADDR_W];

  logic [ADDR_W-1:0] idx;
  assign idx   = addr[ADDR_W-1:0];
  assign rdata = mem[idx];

  always_ff @(posedge clk) begin
    if (data_we) mem[idx] <= wdata;
  end

endmodule
