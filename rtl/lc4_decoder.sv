// lc4_decoder: derives all control signals of the single-cycle LC4 datapath
// from the 16-bit instruction word.
//
// Purely combinational: insn in, one lc4_ctl_t struct out. The opcode in
// I[15:12] and, within an opcode group, the sub-opcode bits pick the values
// of rsMux, rtMux, rdMux, regFile.WE, ALUInputMux, ALU.CTL, DATA.WE,
// regInputMux, NZP.WE, Privilege.CTL and PCMux.CTL. The rules applied are:
//   * regFile.WE is 1 exactly when the instruction writes one of R0..R7;
//   * NZP.WE is 1 when regFile.WE is 1 and for the compares, which set the
//     condition codes without writing a register;
//   * DATA.WE is 1 only for a store;
//   * Privilege.CTL is 1 for TRAP, 0 for RTI and 2 (keep) otherwise;
//   * PCMux is 1 (PC+1) except for branches and jumps.
// Control values that an instruction does not use (a "don't care") are
// driven as 0.
//
// The control words of SUB, LDR, TRAP, RTI, CONST and BRzp follow the worked
// examples of the design, with two exceptions settled by the rules above:
// LDR writes its destination register (regFile.WE = 1) and CONST sets the
// condition codes (NZP.WE = 1); CONST uses ALU operation 32, SEXT(B[8:0]).
// The instruction encodings other than LDR, TRAP, RTI, CONST and BR are those
// of the standard LC4 instruction set; fields the decoder does not need
// (such as the fixed bit I[8] of HICONST) are not checked. Unassigned opcodes
// (0011, 1011, 1110) decode as a no-operation that only advances the PC and
// raise illegal; that treatment is this implementation's choice.
module lc4_decoder
  import lc4_pkg::*;
(
  input  word_t    insn,     // I[15:0]
  output lc4_ctl_t ctl,      // all control signals
  output logic     illegal   // 1 for an unassigned encoding (executed as NOP)
);

  // A control word that changes nothing but the PC.
  localparam lc4_ctl_t CTL_NOP = '{
    rs_mux:     RS_I8_6,
    rt_mux:     RT_I2_0,
    rd_mux:     RD_I11_9,
    regfile_we: 1'b0,
    alu_in_mux: ALUB_RT,
    alu_ctl:    ALU_ADD,
    data_we:    1'b0,
    reg_in_mux: RIN_ALU,
    nzp_we:     1'b0,
    priv_ctl:   PRIV_KEEP,
    pc_mux:     PC_PLUS1
  };

  always_comb begin
    ctl     = CTL_NOP;
    illegal = 1'b0;

    unique case (insn[15:12])
      OP_BR: begin
        ctl.pc_mux = PC_BRANCH;
      end

      OP_ARITH: begin  // ADD MUL SUB DIV, ADD IMM5
        ctl.regfile_we = 1'b1;
        ctl.nzp_we     = 1'b1;
        if (insn[5]) begin
          ctl.alu_in_mux = ALUB_INSN;
          ctl.alu_ctl    = ALU_ADDI5;
        end else begin
          unique case (insn[4:3])
            2'b00: ctl.alu_ctl = ALU_ADD;
            2'b01: ctl.alu_ctl = ALU_MUL;
            2'b10: ctl.alu_ctl = ALU_SUB;
            2'b11: ctl.alu_ctl = ALU_DIV;
            default: ctl.alu_ctl = ALU_ADD;
          endcase
        end
      end

      OP_CMP: begin  // CMP CMPU CMPI CMPIU: Rs is in I[11:9]
        ctl.rs_mux = RS_I11_9;
        ctl.nzp_we = 1'b1;
        unique case (insn[8:7])
          2'b00: ctl.alu_ctl = ALU_CMP;
          2'b01: ctl.alu_ctl = ALU_CMPU;
          2'b10: begin ctl.alu_ctl = ALU_CMPI;  ctl.alu_in_mux = ALUB_INSN; end
          2'b11: begin ctl.alu_ctl = ALU_CMPIU; ctl.alu_in_mux = ALUB_INSN; end
          default: ctl.alu_ctl = ALU_CMP;
        endcase
      end

      OP_JSR: begin  // JSR (I[11]=1), JSRR (I[11]=0): R7 = PC+1
        ctl.rd_mux     = RD_R7;
        ctl.regfile_we = 1'b1;
        ctl.reg_in_mux = RIN_PC1;
        ctl.nzp_we     = 1'b1;
        ctl.pc_mux     = insn[11] ? PC_JSR : PC_RS;
      end

      OP_LOGIC: begin  // AND NOT OR XOR, AND IMM5
        ctl.regfile_we = 1'b1;
        ctl.nzp_we     = 1'b1;
        if (insn[5]) begin
          ctl.alu_in_mux = ALUB_INSN;
          ctl.alu_ctl    = ALU_ANDI5;
        end else begin
          unique case (insn[4:3])
            2'b00: ctl.alu_ctl = ALU_AND;
            2'b01: ctl.alu_ctl = ALU_NOT;
            2'b10: ctl.alu_ctl = ALU_OR;
            2'b11: ctl.alu_ctl = ALU_XOR;
            default: ctl.alu_ctl = ALU_AND;
          endcase
        end
      end

      OP_LDR: begin  // Rd = dmem[Rs + SEXT(IMM6)]
        ctl.regfile_we = 1'b1;
        ctl.alu_in_mux = ALUB_INSN;
        ctl.alu_ctl    = ALU_ADDI6;
        ctl.reg_in_mux = RIN_DATA;
        ctl.nzp_we     = 1'b1;
      end

      OP_STR: begin  // dmem[Rs + SEXT(IMM6)] = Rt, Rt in I[11:9]
        ctl.rt_mux     = RT_I11_9;
        ctl.alu_in_mux = ALUB_INSN;
        ctl.alu_ctl    = ALU_ADDI6;
        ctl.data_we    = 1'b1;
      end

      OP_RTI: begin  // PC = R7, PSR[15] = 0
        ctl.rs_mux   = RS_R7;
        ctl.priv_ctl = PRIV_CLEAR;
        ctl.pc_mux   = PC_RS;
      end

      OP_CONST: begin  // Rd = SEXT(IMM9)
        ctl.regfile_we = 1'b1;
        ctl.alu_in_mux = ALUB_INSN;
        ctl.alu_ctl    = ALU_CONST;
        ctl.nzp_we     = 1'b1;
      end

      OP_SHIFT: begin  // SLL SRA SRL by UIMM4, MOD
        ctl.regfile_we = 1'b1;
        ctl.nzp_we     = 1'b1;
        unique case (insn[5:4])
          2'b00: begin ctl.alu_ctl = ALU_SLL; ctl.alu_in_mux = ALUB_INSN; end
          2'b01: begin ctl.alu_ctl = ALU_SRA; ctl.alu_in_mux = ALUB_INSN; end
          2'b10: begin ctl.alu_ctl = ALU_SRL; ctl.alu_in_mux = ALUB_INSN; end
          2'b11: ctl.alu_ctl = ALU_MOD;
          default: ctl.alu_ctl = ALU_MOD;
        endcase
      end

      OP_JMP: begin  // JMP (I[11]=1) PC = PC+1+SEXT(IMM11); JMPR PC = Rs
        ctl.pc_mux = insn[11] ? PC_IMM11 : PC_RS;
      end

      OP_HICONST: begin  // Rd = (Rd & 0xFF) | (UIMM8 << 8), Rd in I[11:9]
        ctl.rs_mux     = RS_I11_9;
        ctl.regfile_we = 1'b1;
        ctl.alu_in_mux = ALUB_INSN;
        ctl.alu_ctl    = ALU_HICONST;
        ctl.nzp_we     = 1'b1;
      end

      OP_TRAP: begin  // R7 = PC+1, PC = 0x8000 | UIMM8, PSR[15] = 1
        ctl.rd_mux     = RD_R7;
        ctl.regfile_we = 1'b1;
        ctl.reg_in_mux = RIN_PC1;
        ctl.nzp_we     = 1'b1;
        ctl.priv_ctl   = PRIV_SET;
        ctl.pc_mux     = PC_TRAP;
      end

      default: begin
        illegal = 1'b1;
      end
    endcase
  end

endmodule
