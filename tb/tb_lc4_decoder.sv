// tb_lc4_decoder: self-checking test of the instruction decoder.
//
// Part 1 compares the control words of SUB, LDR, TRAP, RTI, CONST and BRzp
// with the values worked out for these instructions, skipping the fields an
// instruction does not use. Part 2 decodes all 65536 instruction words and
// checks rules that hold for every instruction: regFile.WE is 1 exactly for
// the instructions that write a register, NZP.WE is 1 exactly when a
// register is written or for a compare, DATA.WE only for STR,
// Privilege.CTL is 1 only for TRAP and 0 only for RTI, and the PCMux and
// ALU.CTL values expected for each opcode and sub-opcode, written out here
// as a table independent of the decoder.
module tb_lc4_decoder;
  import lc4_pkg::*;

  word_t    insn;
  lc4_ctl_t ctl;
  logic     illegal;
  int checks = 0, failures = 0;

  lc4_decoder dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL insn=%h %s got=%0d exp=%0d", insn, what, got, exp);
    end
  endtask

  // Fields of a worked example; -1 marks a don't care.
  task automatic example(word_t i, int rs, int rt, int rd, int rwe, int aim, int actl,
                         int dwe, int rim, int nwe, int priv, int pcm);
    insn = i; #1;
    if (rs   >= 0) check("rsMux",        int'(ctl.rs_mux), rs);
    if (rt   >= 0) check("rtMux",        int'(ctl.rt_mux), rt);
    if (rd   >= 0) check("rdMux",        int'(ctl.rd_mux), rd);
    if (rwe  >= 0) check("regFile.WE",   int'(ctl.regfile_we), rwe);
    if (aim  >= 0) check("ALUInputMux",  int'(ctl.alu_in_mux), aim);
    if (actl >= 0) check("ALU.CTL",      int'(ctl.alu_ctl), actl);
    if (dwe  >= 0) check("DATA.WE",      int'(ctl.data_we), dwe);
    if (rim  >= 0) check("regInputMux",  int'(ctl.reg_in_mux), rim);
    if (nwe  >= 0) check("NZP.WE",       int'(ctl.nzp_we), nwe);
    if (priv >= 0) check("Privilege",    int'(ctl.priv_ctl), priv);
    if (pcm  >= 0) check("PCMux",        int'(ctl.pc_mux), pcm);
  endtask

  initial begin
    int op, rwe, nwe, pcm, actl;
    //       insn                rs  rt  rd rwe aim actl dwe rim nwe priv pcm
    example(16'b0001_011_010_010_001, 0, 0, 0, 1, 0, 2,  0, 0, 1, 2, 1);  // SUB R3,R2,R1
    example(16'b0110_011_010_000101,  0, -1, 0, 1, 1, 6,  0, 1, 1, 2, 1);  // LDR R3,R2,#5
    example(16'b1111_0000_0010_0101, -1, -1, 1, 1, -1, -1, 0, 2, 1, 1, 4); // TRAP x25
    example(16'b1000_0000_0000_0000,  1, -1, -1, 0, -1, -1, 0, -1, 0, 0, 3); // RTI
    example(16'b1001_101_1_0000_0011, -1, -1, 0, 1, 1, 32, 0, 0, 1, 2, 1); // CONST R5,#-253
    example(16'b0000_011_0_0000_1000, -1, -1, -1, 0, -1, -1, 0, -1, 0, 2, 0); // BRzp

    for (int w = 0; w < 65536; w++) begin
      insn = word_t'(w); #1;
      op = w >> 12;
      // registers written by: ARITH CMP? no; JSR LOGIC LDR CONST SHIFT HICONST TRAP
      rwe = (op inside {1, 4, 5, 6, 9, 10, 13, 15}) ? 1 : 0;
      nwe = (rwe == 1 || op == 2) ? 1 : 0;
      case (op)
        0:  pcm = 0;
        4:  pcm = insn[11] ? 5 : 3;
        8:  pcm = 3;
        12: pcm = insn[11] ? 2 : 3;
        15: pcm = 4;
        default: pcm = 1;
      endcase
      case (op)
        1:  actl = insn[5] ? 5 : int'(insn[4:3]);           // ADD MUL SUB DIV / ADDI
        2:  actl = 16 + int'(insn[8:7]);                     // CMP CMPU CMPI CMPIU
        5:  actl = insn[5] ? 12 : 8 + int'(insn[4:3]);       // AND NOT OR XOR / ANDI
        6, 7: actl = 6;                                      // LDR STR address
        9:  actl = 32;
        10: actl = (insn[5:4] == 3) ? 4 : 24 + int'(insn[5:4]);
        13: actl = 33;
        default: actl = -1;
      endcase
      check("regFile.WE rule", int'(ctl.regfile_we), rwe);
      check("NZP.WE rule", int'(ctl.nzp_we), nwe);
      check("DATA.WE rule", int'(ctl.data_we), (op == 7) ? 1 : 0);
      check("Privilege rule", int'(ctl.priv_ctl), (op == 15) ? 1 : (op == 8) ? 0 : 2);
      check("PCMux", int'(ctl.pc_mux), pcm);
      if (actl >= 0) check("ALU.CTL", int'(ctl.alu_ctl), actl);
      check("illegal", int'(illegal), (op inside {3, 11, 14}) ? 1 : 0);
      if (rwe == 1)
        check("regInputMux", int'(ctl.reg_in_mux), (op inside {4, 15}) ? 2 : (op == 6) ? 1 : 0);
      if (op == 7) check("STR rtMux", int'(ctl.rt_mux), 1);
      if (op inside {2, 13}) check("rsMux I[11:9]", int'(ctl.rs_mux), 2);
      if (op inside {4, 15}) check("rdMux R7", int'(ctl.rd_mux), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
