// lc4_branch_unit: program counter, condition codes and next-PC selection of
// the single-cycle LC4 datapath.
//
// Parts, as on the datapath figure:
//   * PC register and the +1 incrementer that forms PC+1.
//   * NZP tester: classifies the value being written back (the regInputMux
//     output) as negative (N, 100), zero (Z, 010) or positive (P, 001).
//   * NZP register PSR[2:0]: loads the tester's code on the clock edge that
//     ends the instruction when NZP.WE is 1.
//   * TEST: a branch is taken when any condition named in I[11:9] is set in
//     the NZP register, i.e. |(I[11:9] & PSR[2:0]).
//   * PCMux, selecting the next PC:
//       0  PC+1+SEXT(I[8:0]) if TEST passes, else PC+1   (BR)
//       1  PC+1                                          (most instructions)
//       2  PC+1+SEXT(I[10:0])                            (JMP)
//       3  RS                                            (JMPR, JSRR, RTI)
//       4  0x8000 | I[7:0]                               (TRAP)
//       5  (PC & 0x8000) | (I[10:0] << 4)                (JSR)
// The PC loads the selected value on every rising clock edge, one
// instruction per cycle. The branch test reads the NZP register before the
// current instruction updates it.
//
// Design choices not fixed by the source: the PC register lives in this
// unit, as the unit is its only writer; on the synchronous active-high reset
// the PC takes RESET_PC (0x8200, the customary LC4 operating-system entry
// point) and the NZP register takes RESET_NZP (Z). PCMux values 6 and 7 are
// not used by the design and select PC+1 here.
module lc4_branch_unit
  import lc4_pkg::*;
#(
  parameter word_t      RESET_PC  = 16'h8200,
  parameter logic [2:0] RESET_NZP = 3'b010
) (
  input  logic       clk,
  input  logic       rst,
  input  word_t      insn,          // I[15:0]
  input  pc_mux_e    pc_mux,        // PCMux.CTL
  input  logic       nzp_we,        // NZP.WE
  input  word_t      rs_data,       // RS[15:0]
  input  word_t      wb_data,       // regInputMux output, NZP tester input
  output word_t      pc,            // PC[15:0]
  output word_t      pc_plus1,      // PC+1
  output word_t      next_pc,       // PCMux output
  output logic [2:0] nzp,           // PSR[2:0]
  output logic       branch_taken   // TEST output
);

  logic [2:0] nzp_new;
  word_t      br_target, jmp_target, trap_target, jsr_target;

  assign pc_plus1 = pc + 16'd1;

  // NZP tester
  always_comb begin
    if (wb_data[15])          nzp_new = 3'b100;
    else if (wb_data == '0)   nzp_new = 3'b010;
    else                      nzp_new = 3'b001;
  end

  // TEST
  assign branch_taken = |(insn[11:9] & nzp);

  assign br_target   = pc_plus1 + {{7{insn[8]}}, insn[8:0]};
  assign jmp_target  = pc_plus1 + {{5{insn[10]}}, insn[10:0]};
  assign trap_target = 16'h8000 | {8'h00, insn[7:0]};
  assign jsr_target  = (pc & 16'h8000) | {1'b0, insn[10:0], 4'b0000};

  // PCMux
  always_comb begin
    unique case (pc_mux)
      PC_BRANCH: next_pc = branch_taken ? br_target : pc_plus1;
      PC_PLUS1:  next_pc = pc_plus1;
      PC_IMM11:  next_pc = jmp_target;
      PC_RS:     next_pc = rs_data;
      PC_TRAP:   next_pc = trap_target;
      PC_JSR:    next_pc = jsr_target;
      default:   next_pc = pc_plus1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= RESET_PC;
      nzp <= RESET_NZP;
    end else begin
      pc <= next_pc;
      if (nzp_we) nzp <= nzp_new;
    end
  end

endmodule
