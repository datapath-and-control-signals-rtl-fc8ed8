// lc4_regfile: the eight 16-bit general registers R0..R7 together with the
// three address multiplexers that pick their register numbers out of the
// instruction word.
//
// rsMux selects the first read address from I[8:6] (0), the constant 7 (1)
// or I[11:9] (2); rtMux selects the second read address from I[2:0] (0) or
// I[11:9] (1); rdMux selects the write address from I[11:9] (0) or 7 (1).
// These encodings are taken from the datapath figure. Both read ports are
// combinational, so RS and RT follow the instruction within the same cycle.
// The write port stores wdata into the selected register on the rising clock
// edge when regfile_we is 1, which is the end of the instruction's single
// cycle. A read of the register being written returns the old value, as a
// single-cycle machine needs.
//
// Design choices not fixed by the source: all registers clear to 0 on the
// synchronous active-high reset rst, and R0 is an ordinary register (LC4 has
// no hard-wired zero register).
module lc4_regfile
  import lc4_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  word_t   insn,        // instruction word I[15:0]
  input  rs_mux_e rs_mux,      // rsMux.CTL
  input  rt_mux_e rt_mux,      // rtMux.CTL
  input  rd_mux_e rd_mux,      // rdMux.CTL
  input  logic    regfile_we,  // regFile.WE
  input  word_t   wdata,       // Write Input
  output word_t   rs_data,     // RS[15:0]
  output word_t   rt_data,     // RT[15:0]
  output reg_addr_t rd_addr    // rd.addr, for observation
);

  word_t     regs [NREGS];
  reg_addr_t rs_addr, rt_addr;  // rs.addr, rt.addr

  always_comb begin
    unique case (rs_mux)
      RS_I8_6:  rs_addr = insn[8:6];
      RS_R7:    rs_addr = 3'd7;
      RS_I11_9: rs_addr = insn[11:9];
      default:  rs_addr = insn[8:6];
    endcase
    rt_addr = (rt_mux == RT_I11_9) ? insn[11:9] : insn[2:0];
    rd_addr = (rd_mux == RD_R7) ? 3'd7 : insn[11:9];
  end

  assign rs_data = regs[rs_addr];
  assign rt_data = regs[rt_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (regfile_we) begin
      regs[rd_addr] <= wdata;
    end
  end

endmodule
