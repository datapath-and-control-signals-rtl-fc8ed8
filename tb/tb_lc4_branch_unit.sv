// tb_lc4_branch_unit: self-checking test of the branch unit (PC register,
// PC+1, NZP tester, NZP register, TEST and PCMux).
//
// After reset the PC must be 0x8200 and the NZP register Z. Then random
// instruction words, PCMux values, NZP.WE values, RS values and write-back
// values are applied one per clock. Before each edge the bench computes the
// expected next PC and branch decision from its own copy of PC and NZP and
// compares them with next_pc and branch_taken; after the edge it checks that
// the PC took that value and that NZP was loaded (or kept) as NZP.WE says.
// Every PCMux value, and taken and not-taken branches, are counted and must
// each occur.
module tb_lc4_branch_unit;
  import lc4_pkg::*;

  logic       clk = 0, rst, nzp_we, branch_taken;
  word_t      insn, rs_data, wb_data, pc, pc_plus1, next_pc;
  pc_mux_e    pc_mux;
  logic [2:0] nzp;
  int checks = 0, failures = 0;
  int seen [8];
  int taken_cnt = 0, not_taken_cnt = 0;

  lc4_branch_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h (insn=%h mux=%0d)", what, got, exp, insn, pc_mux);
    end
  endtask

  function automatic int sx(int v, int bits);
    int m = 1 << (bits - 1);
    v = v & ((1 << bits) - 1);
    return (v ^ m) - m;
  endfunction

  initial begin
    int m_pc, m_nzp, exp_next, exp_new_nzp, p1;
    bit tk;
    rst = 1; insn = 0; pc_mux = PC_PLUS1; nzp_we = 0; rs_data = 0; wb_data = 0;
    @(posedge clk); #1;
    rst = 0;
    check("reset pc", int'(pc), 'h8200);
    check("reset nzp", int'(nzp), 3'b010);
    m_pc = 'h8200; m_nzp = 3'b010;
    for (int n = 0; n < 20000; n++) begin
      insn    = word_t'($urandom);
      pc_mux  = pc_mux_e'($urandom_range(0, 5));
      nzp_we  = 1'($urandom);
      rs_data = word_t'($urandom);
      case ($urandom_range(0, 3))
        0: wb_data = 16'h0000;
        1: wb_data = word_t'($urandom_range(1, 'h7FFF));
        2: wb_data = word_t'($urandom_range('h8000, 'hFFFF));
        default: wb_data = word_t'($urandom);
      endcase
      p1 = (m_pc + 1) & 'hFFFF;
      tk = (insn[11:9] & m_nzp[2:0]) != 0;
      case (pc_mux)
        PC_BRANCH: exp_next = tk ? ((p1 + sx(insn, 9)) & 'hFFFF) : p1;
        PC_PLUS1:  exp_next = p1;
        PC_IMM11:  exp_next = (p1 + sx(insn, 11)) & 'hFFFF;
        PC_RS:     exp_next = rs_data;
        PC_TRAP:   exp_next = 'h8000 + (insn & 'hFF);
        default:   exp_next = (m_pc & 'h8000) + ((insn & 'h7FF) * 16);
      endcase
      exp_new_nzp = ($signed(wb_data) < 0) ? 4 : (wb_data == 0) ? 2 : 1;
      #1;
      check("pc_plus1", int'(pc_plus1), p1);
      check("next_pc", int'(next_pc), exp_next);
      check("branch_taken", int'(branch_taken), int'(tk));
      seen[pc_mux]++;
      if (pc_mux == PC_BRANCH) begin
        if (tk) taken_cnt++; else not_taken_cnt++;
      end
      @(posedge clk); #1;
      m_pc = exp_next;
      if (nzp_we) m_nzp = exp_new_nzp;
      check("pc", int'(pc), m_pc);
      check("nzp", int'(nzp), m_nzp);
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("PCMux %0d never used", k); end
    end
    checks++;
    if (taken_cnt == 0 || not_taken_cnt == 0) begin
      failures++; $display("branch taken=%0d not taken=%0d", taken_cnt, not_taken_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
