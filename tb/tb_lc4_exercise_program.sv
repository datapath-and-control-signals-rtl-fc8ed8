// tb_lc4_exercise_program: runs a short hand-assembled program on the full
// single-cycle core, built around the six instructions SUB, LDR, TRAP, RTI,
// CONST and BRzp (plus STR to give LDR something to load).
//
// Expected PC sequence, register values, stored word, condition codes and
// privilege bit were all worked out by hand and are written into the bench
// as constants. The program, at the reset address 0x8200:
//   8200 9264  CONST R1,#100      R1 = 0x0064          NZP = P
//   8201 95FD  CONST R2,#-3       R2 = 0xFFFD          NZP = N
//   8202 1652  SUB   R3,R1,R2     R3 = 0x0067          NZP = P
//   8203 7645  STR   R3,R1,#5     mem[0x0069] = 0x0067
//   8204 6845  LDR   R4,R1,#5     R4 = 0x0067          NZP = P
//   8205 9A00  CONST R5,#0        R5 = 0               NZP = Z
//   8206 0602  BRzp  +2           taken -> 8209
//   8207 9C01  CONST R6,#1        skipped
//   8208 9C01  CONST R6,#1        skipped
//   8209 93FF  CONST R1,#-1       R1 = 0xFFFF          NZP = N
//   820A 0601  BRzp  +1           not taken -> 820B
//   820B F025  TRAP  x25          R7 = 0x820C, PC = 8025, PSR[15] = 1, NZP = N
//   8025 8000  RTI                PC = R7 = 820C, PSR[15] = 0
//   820C 9007  CONST R0,#7        R0 = 7               NZP = P
// Thirteen instructions must take thirteen cycles (one per cycle).
module tb_lc4_exercise_program;
  import lc4_pkg::*;

  logic       clk = 0, rst = 1;
  logic       prog_we = 0;
  word_t      prog_addr = 0, prog_data = 0;
  word_t      pc, insn, wb_data, data_addr, data_wdata, next_pc;
  logic       illegal, regfile_we, data_we, psr15, branch_taken;
  reg_addr_t  rd_addr;
  logic [2:0] nzp;

  lc4_single_cycle dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t regs [8];

  localparam int N = 13;
  localparam word_t PCS  [N] = '{16'h8200, 16'h8201, 16'h8202, 16'h8203, 16'h8204, 16'h8205,
                                 16'h8206, 16'h8209, 16'h820A, 16'h820B, 16'h8025, 16'h820C,
                                 16'h820D};
  // NZP after each of the first N-1 instructions.
  localparam logic [2:0] NZPS [N-1] = '{3'b001, 3'b100, 3'b001, 3'b001, 3'b001, 3'b010, 3'b010,
                                        3'b100, 3'b100, 3'b100, 3'b100, 3'b001};
  localparam logic PRIVS [N-1] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0};

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic load(word_t a, word_t d);
    prog_addr = a; prog_data = d; prog_we = 1;
    @(posedge clk); #1;
    prog_we = 0;
  endtask

  always @(posedge clk) if (!rst && regfile_we) regs[rd_addr] <= wb_data;

  initial begin
    int stores = 0;
    foreach (regs[k]) regs[k] = '0;
    rst = 1;
    load(16'h8200, 16'h9264); load(16'h8201, 16'h95FD); load(16'h8202, 16'h1652);
    load(16'h8203, 16'h7645); load(16'h8204, 16'h6845); load(16'h8205, 16'h9A00);
    load(16'h8206, 16'h0602); load(16'h8207, 16'h9C01); load(16'h8208, 16'h9C01);
    load(16'h8209, 16'h93FF); load(16'h820A, 16'h0601); load(16'h820B, 16'hF025);
    load(16'h8025, 16'h8000); load(16'h820C, 16'h9007); load(16'h820D, 16'h0000);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < N - 1; c++) begin
      #1;
      check($sformatf("pc before instruction %0d", c), int'(pc), int'(PCS[c]));
      if (data_we) begin
        stores++;
        check("store address", int'(data_addr), 'h0069);
        check("store data", int'(data_wdata), 'h0067);
      end
      @(posedge clk); #1;
      check($sformatf("nzp after instruction %0d", c), int'(nzp), int'(NZPS[c]));
      check($sformatf("psr15 after instruction %0d", c), int'(psr15), int'(PRIVS[c]));
      @(negedge clk);
    end
    #1;
    // Thirteenth PC reached after twelve cycles: one instruction per cycle.
    check("final pc", int'(pc), int'(PCS[N-1]));
    check("one store", stores, 1);
    check("R0", int'(regs[0]), 'h0007);
    check("R1", int'(regs[1]), 'hFFFF);
    check("R2", int'(regs[2]), 'hFFFD);
    check("R3", int'(regs[3]), 'h0067);
    check("R4", int'(regs[4]), 'h0067);
    check("R5", int'(regs[5]), 'h0000);
    check("R6", int'(regs[6]), 'h0000);
    check("R7", int'(regs[7]), 'h820C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
