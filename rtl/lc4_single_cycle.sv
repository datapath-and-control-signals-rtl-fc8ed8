// lc4_single_cycle: a single-cycle implementation of the 16-bit LC4
// instruction set.
//
// Every instruction completes in one clock cycle. During the cycle the PC
// addresses the program memory; the decoder turns the instruction into the
// eleven control signals; the register file reads RS and RT; the ALU computes
// from RS and either RT or the instruction word; the data memory is read at
// the ALU result; regInputMux picks the write-back value (ALU result, loaded
// word or PC+1); and the branch unit picks the next PC. On the rising clock
// edge that ends the cycle the PC, the register written (if regFile.WE), the
// memory word stored (if DATA.WE), the NZP condition codes PSR[2:0] (if
// NZP.WE) and the privilege bit PSR[15] are all updated together. The
// datapath wiring follows the datapath figure of the design.
//
// Interface: clk and a synchronous active-high rst. While rst is high the
// program memory can be filled through prog_we/prog_addr/prog_data (this
// load port is an addition of this implementation). The remaining outputs
// expose, for the instruction of the current cycle, the PC, the instruction,
// the register write, the data memory store, the condition codes and the
// privilege bit, so that a test bench or a trace can follow execution.
module lc4_single_cycle
  import lc4_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 16,        // program memory: 2^16 words
  parameter int unsigned DMEM_ADDR_W = 16,        // data memory: 2^16 words
  parameter word_t       RESET_PC    = 16'h8200   // PC after reset
) (
  input  logic       clk,
  input  logic       rst,
  // program load port
  input  logic       prog_we,
  input  word_t      prog_addr,
  input  word_t      prog_data,
  // execution trace of the current instruction
  output word_t      pc,
  output word_t      insn,
  output logic       illegal,
  output logic       regfile_we,
  output reg_addr_t  rd_addr,
  output word_t      wb_data,
  output logic       data_we,
  output word_t      data_addr,
  output word_t      data_wdata,
  output logic [2:0] nzp,
  output logic       psr15,
  output word_t      next_pc,
  output logic       branch_taken
);

  lc4_ctl_t ctl;
  word_t    rs_data, rt_data, alu_result, data_rdata, pc_plus1;

  lc4_prog_mem #(.ADDR_W(IMEM_ADDR_W)) u_prog_mem (
    .clk       (clk),
    .pc        (pc),
    .insn      (insn),
    .load_we   (prog_we),
    .load_addr (prog_addr),
    .load_data (prog_data)
  );

  lc4_decoder u_decoder (
    .insn    (insn),
    .ctl     (ctl),
    .illegal (illegal)
  );

  lc4_regfile u_regfile (
    .clk        (clk),
    .rst        (rst),
    .insn       (insn),
    .rs_mux     (ctl.rs_mux),
    .rt_mux     (ctl.rt_mux),
    .rd_mux     (ctl.rd_mux),
    .regfile_we (regfile_we),
    .wdata      (wb_data),
    .rs_data    (rs_data),
    .rt_data    (rt_data),
    .rd_addr    (rd_addr)
  );

  lc4_alu u_alu (
    .rs_data    (rs_data),
    .rt_data    (rt_data),
    .insn       (insn),
    .alu_in_mux (ctl.alu_in_mux),
    .alu_ctl    (ctl.alu_ctl),
    .result     (alu_result)
  );

  lc4_data_mem #(.ADDR_W(DMEM_ADDR_W)) u_data_mem (
    .clk     (clk),
    .data_we (data_we),
    .addr    (alu_result),
    .wdata   (rt_data),
    .rdata   (data_rdata)
  );

  lc4_reg_input_mux u_reg_input_mux (
    .sel        (ctl.reg_in_mux),
    .alu_result (alu_result),
    .data_out   (data_rdata),
    .pc_plus1   (pc_plus1),
    .wdata      (wb_data)
  );

  lc4_branch_unit #(.RESET_PC(RESET_PC)) u_branch_unit (
    .clk          (clk),
    .rst          (rst),
    .insn         (insn),
    .pc_mux       (ctl.pc_mux),
    .nzp_we       (ctl.nzp_we & ~rst),
    .rs_data      (rs_data),
    .wb_data      (wb_data),
    .pc           (pc),
    .pc_plus1     (pc_plus1),
    .next_pc      (next_pc),
    .nzp          (nzp),
    .branch_taken (branch_taken)
  );

  lc4_privilege u_privilege (
    .clk      (clk),
    .rst      (rst),
    .priv_ctl (ctl.priv_ctl),
    .psr15    (psr15)
  );

  // No architectural state changes while the machine is held in reset.
  assign regfile_we = ctl.regfile_we & ~rst;
  assign data_we    = ctl.data_we & ~rst;
  assign data_addr  = alu_result;
  assign data_wdata = rt_data;

endmodule
