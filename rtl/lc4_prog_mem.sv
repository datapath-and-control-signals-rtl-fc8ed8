// lc4_prog_mem: the program (instruction) memory of the single-cycle LC4
// datapath.
//
// The PC addresses it and the addressed 16-bit instruction word I[15:0]
// appears combinationally on insn within the same cycle, as a single-cycle
// machine needs. The datapath itself never writes this memory. So that a
// program can be placed in it, the memory has a separate load port: when
// load_we is 1, load_data is written to load_addr on the rising clock edge.
// The load port is this implementation's own addition; the machine is
// expected to be held in reset while a program is loaded.
//
// The address width follows the 16-bit PC, so the default memory holds 2^16
// words. Contents are not reset.
module lc4_prog_mem
  import lc4_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic  clk,
  input  word_t pc,         // Instruction Address PC[15:0]
  output word_t insn,       // Instruction I[15:0]
  input  logic  load_we,    // program load strobe
  input  word_t load_addr,  // program load address
  input  word_t load_data   // program load word
);

  word_t mem [2**ADDR_W];

  assign insn = mem[pc[ADDR_W-1:0]];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[ADDR_W-1:0]] <= load_data;
  end

endmodule
