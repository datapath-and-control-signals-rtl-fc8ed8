// tb_lc4_single_cycle: end-to-end test of the single-cycle LC4 core at its
// default (full) size, against an instruction-level reference model.
//
// The bench holds its own model of the architectural state (R0..R7, PC,
// NZP, PSR[15], program and data memory) and executes the same program one
// instruction at a time, written from the instruction-set description and
// independent of the RTL. Every clock cycle it compares the core's PC and
// instruction, the register write (enable, register number, value), the
// data memory store (enable, address, value) and the next PC; after each
// edge it compares NZP and PSR[15]. One instruction must retire every cycle
// (CPI = 1), which is checked by counting cycles against retired
// instructions.
//
// Program: the whole 2^16-word program memory is filled with random LC4
// instructions through the load port, and the whole data memory is filled
// with random words (written directly into the memory array, mirrored in the
// model). The run is split into episodes: in each, the core is held in reset
// while the 256 words at the reset address 0x8200 are replaced with fresh
// random instructions, and then runs EPISODE_CYCLES cycles. Branch and jump
// offsets of -1 (a jump to itself) are not generated.
//
// Mechanisms counted, each of which must occur: every PCMux path (branch
// taken and not taken, PC+1, PC+1+IMM11, RS, TRAP vector, JSR target), every
// regInputMux source, stores, loads of a stored word, privilege set and
// clear, NZP loads of N, Z and P, unassigned opcodes executed as no-ops,
// divide by zero, and every ALU.CTL operation.
module tb_lc4_single_cycle;
  import lc4_pkg::*;

  localparam int EPISODES       = 400;
  localparam int EPISODE_CYCLES = 2000;
  localparam int ALU_OPS [21] = '{0, 1, 2, 3, 4, 5, 6, 8, 9, 10, 11, 12, 16, 17, 18, 19,
                                  24, 25, 26, 32, 33};

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
  longint cycles = 0, retired = 0;

  // Reference model state.
  bit [15:0] m_r [8];
  bit [15:0] m_pc, m_nzp3;
  bit        m_priv;
  bit [15:0] m_imem [65536];
  bit [15:0] m_dmem [65536];
  bit        m_stored [65536];

  // Mechanism counters.
  int c_br_taken, c_br_not, c_pc1, c_jmp, c_rs, c_trap, c_jsr;
  int c_rin_alu, c_rin_data, c_rin_pc1, c_store, c_load_stored;
  int c_priv_set, c_priv_clr, c_nzp_n, c_nzp_z, c_nzp_p, c_illegal, c_div0;
  int c_alu [64];

  initial begin : watchdog
    repeat (65536 + EPISODES * (EPISODE_CYCLES + 300) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30)
        $display("FAIL cycle %0d pc=%h insn=%h: %s got=%h exp=%h", cycles, m_pc, m_imem[m_pc],
                 what, got, exp);
    end
  endtask

  function automatic bit [15:0] sext(bit [15:0] v, int bits);
    bit [15:0] r = v & 16'((1 << bits) - 1);
    if (v[bits-1]) r = r | ~16'((1 << bits) - 1);
    return r;
  endfunction

  function automatic bit [15:0] cmp3(bit signed [16:0] x, bit signed [16:0] y);
    return (x < y) ? 16'hFFFF : (x == y) ? 16'h0000 : 16'h0001;
  endfunction

  // Random instruction, opcode chosen with weights.
  function automatic bit [15:0] rand_insn();
    bit [15:0] w = 16'($urandom);
    int k = $urandom_range(0, 99);
    if      (k < 12) w[15:12] = 4'b0000;  // BR
    else if (k < 24) w[15:12] = 4'b0001;  // arithmetic
    else if (k < 32) w[15:12] = 4'b0010;  // compare
    else if (k < 35) w[15:12] = 4'b0100;  // JSR / JSRR
    else if (k < 46) w[15:12] = 4'b0101;  // logic
    else if (k < 55) w[15:12] = 4'b0110;  // LDR
    else if (k < 64) w[15:12] = 4'b0111;  // STR
    else if (k < 66) w[15:12] = 4'b1000;  // RTI
    else if (k < 74) w[15:12] = 4'b1001;  // CONST
    else if (k < 84) w[15:12] = 4'b1010;  // shifts, MOD
    else if (k < 87) w[15:12] = 4'b1100;  // JMP / JMPR
    else if (k < 93) w[15:12] = 4'b1101;  // HICONST
    else if (k < 96) w[15:12] = 4'b1111;  // TRAP
    else             w[15:12] = (k < 98) ? 4'b0011 : 4'b1110;  // unassigned
    if (w[15:12] == 4'b0000 && w[8:0] == 9'h1FF) w[8:0] = 9'h001;
    if (w[15:12] == 4'b1100 && w[11] && w[10:0] == 11'h7FF) w[10:0] = 11'h001;
    // Division operands are often zero: steer some DIV/MOD onto R0 as divisor.
    if ($urandom_range(0, 15) == 0) w[2:0] = 3'd0;
    return w;
  endfunction

  // Execute the instruction at m_pc in the model and compare with the core.
  task automatic step();
    bit [15:0] i = m_imem[m_pc];
    bit [3:0]  op = i[15:12];
    bit [15:0] pc1 = m_pc + 16'd1;
    bit [15:0] rs, rt, res, npc, addr;
    bit        we = 0, dwe = 0, setcc = 0;
    bit [2:0]  rd = i[11:9];
    int        actl = -1;

    npc = pc1;
    rs = m_r[i[8:6]];
    rt = m_r[i[2:0]];
    case (op)
      4'b0000: begin
        if ((i[11:9] & m_nzp3) != 0) begin npc = pc1 + sext(i, 9); c_br_taken++; end
        else c_br_not++;
      end
      4'b0001: begin
        we = 1; setcc = 1;
        if (i[5]) begin res = rs + sext(i, 5); actl = 5; end
        else case (i[4:3])
          2'b00: begin res = rs + rt; actl = 0; end
          2'b01: begin res = rs * rt; actl = 1; end
          2'b10: begin res = rs - rt; actl = 2; end
          default: begin
            res = (rt == 0) ? 16'h0 : rs / rt; actl = 3;
            if (rt == 0) c_div0++;
          end
        endcase
      end
      4'b0010: begin
        setcc = 1;
        rs = m_r[i[11:9]];
        case (i[8:7])
          2'b00: begin res = cmp3($signed({rs[15], rs}), $signed({rt[15], rt})); actl = 16; end
          2'b01: begin res = cmp3($signed({1'b0, rs}), $signed({1'b0, rt})); actl = 17; end
          2'b10: begin res = cmp3($signed({rs[15], rs}), $signed({i[6] ? 1'b1 : 1'b0, sext(i, 7)})); actl = 18; end
          default: begin res = cmp3($signed({1'b0, rs}), $signed({1'b0, sext(i, 7)})); actl = 19; end
        endcase
      end
      4'b0100: begin
        we = 1; setcc = 1; rd = 3'd7; res = pc1;
        if (i[11]) begin npc = (m_pc & 16'h8000) | (16'(i[10:0]) << 4); c_jsr++; end
        else begin npc = rs; c_rs++; end
      end
      4'b0101: begin
        we = 1; setcc = 1;
        if (i[5]) begin res = rs & sext(i, 5); actl = 12; end
        else case (i[4:3])
          2'b00: begin res = rs & rt; actl = 8; end
          2'b01: begin res = ~rs; actl = 9; end
          2'b10: begin res = rs | rt; actl = 10; end
          default: begin res = rs ^ rt; actl = 11; end
        endcase
      end
      4'b0110: begin
        we = 1; setcc = 1; actl = 6;
        addr = rs + sext(i, 6);
        res = m_dmem[addr];
        if (m_stored[addr]) c_load_stored++;
      end
      4'b0111: begin
        dwe = 1; actl = 6;
        addr = rs + sext(i, 6);
        rt = m_r[i[11:9]];
      end
      4'b1000: begin
        npc = m_r[7]; c_rs++;
      end
      4'b1001: begin
        we = 1; setcc = 1; res = sext(i, 9); actl = 32;
      end
      4'b1010: begin
        we = 1; setcc = 1;
        case (i[5:4])
          2'b00: begin res = rs << i[3:0]; actl = 24; end
          2'b01: begin res = 16'($signed(rs) >>> i[3:0]); actl = 25; end
          2'b10: begin res = rs >> i[3:0]; actl = 26; end
          default: begin
            res = (rt == 0) ? 16'h0 : rs % rt; actl = 4;
            if (rt == 0) c_div0++;
          end
        endcase
      end
      4'b1100: begin
        if (i[11]) begin npc = pc1 + sext(i, 11); c_jmp++; end
        else begin npc = rs; c_rs++; end
      end
      4'b1101: begin
        we = 1; setcc = 1; actl = 33;
        res = (m_r[i[11:9]] & 16'h00FF) | (16'(i[7:0]) << 8);
      end
      4'b1111: begin
        we = 1; setcc = 1; rd = 3'd7; res = pc1;
        npc = 16'h8000 | 16'(i[7:0]); c_trap++;
      end
      default: begin
        c_illegal++;
      end
    endcase
    if (npc == pc1 && !(op == 4'b0000)) c_pc1++;

    // Compare this cycle's combinational outputs.
    check("pc", int'(pc), int'(m_pc));
    check("insn", int'(insn), int'(i));
    check("illegal", int'(illegal), int'(op inside {4'b0011, 4'b1011, 4'b1110}));
    check("regfile_we", int'(regfile_we), int'(we));
    if (we) begin
      check("rd_addr", int'(rd_addr), int'(rd));
      check("wb_data", int'(wb_data), int'(res));
    end
    check("data_we", int'(data_we), int'(dwe));
    if (dwe) begin
      check("data_addr", int'(data_addr), int'(addr));
      check("data_wdata", int'(data_wdata), int'(rt));
    end
    check("next_pc", int'(next_pc), int'(npc));

    // Count mechanisms.
    if (actl >= 0) c_alu[actl]++;
    if (we && (op == 4'b0100 || op == 4'b1111)) c_rin_pc1++;
    else if (we && op == 4'b0110) c_rin_data++;
    else if (we) c_rin_alu++;
    if (dwe) c_store++;
    if (op == 4'b1111) c_priv_set++;
    if (op == 4'b1000) c_priv_clr++;

    // Commit.
    if (we) m_r[rd] = res;
    if (dwe) begin m_dmem[addr] = rt; m_stored[addr] = 1; end
    if (setcc) begin
      if (res[15]) begin m_nzp3 = 3'b100; c_nzp_n++; end
      else if (res == 0) begin m_nzp3 = 3'b010; c_nzp_z++; end
      else begin m_nzp3 = 3'b001; c_nzp_p++; end
    end
    if (op == 4'b1111) m_priv = 1;
    if (op == 4'b1000) m_priv = 0;
    m_pc = npc;
    retired++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    // Fill program and data memory.
    for (int a = 0; a < 65536; a++) begin
      m_imem[a] = rand_insn();
      m_dmem[a] = 16'($urandom);
      dut.u_data_mem.mem[a] = m_dmem[a];
    end
    rst = 1;
    prog_we = 1;
    for (int a = 0; a < 65536; a++) begin
      prog_addr = word_t'(a); prog_data = m_imem[a];
      @(posedge clk); #1;
    end
    prog_we = 0;

    for (int e = 0; e < EPISODES; e++) begin
      // Hold reset and lay fresh code at the reset address.
      rst = 1;
      prog_we = 1;
      for (int a = 16'h8200; a < 16'h8300; a++) begin
        m_imem[a] = rand_insn();
        prog_addr = word_t'(a); prog_data = m_imem[a];
        @(posedge clk); #1;
      end
      prog_we = 0;
      @(posedge clk); #1;
      foreach (m_r[k]) m_r[k] = 0;
      m_pc = 16'h8200; m_nzp3 = 3'b010; m_priv = 1;
      check("reset nzp", int'(nzp), 2);
      check("reset psr15", int'(psr15), 1);
      @(negedge clk);
      rst = 0;
      for (int c = 0; c < EPISODE_CYCLES; c++) begin
        #1;
        step();
        cycles++;
        @(posedge clk); #1;
        check("nzp", int'(nzp), int'(m_nzp3));
        check("psr15", int'(psr15), int'(m_priv));
        @(negedge clk);
      end
    end

    // One instruction per cycle.
    check("CPI = 1", int'(cycles), int'(retired));

    need("branch taken", c_br_taken);
    need("branch not taken", c_br_not);
    need("PC+1", c_pc1);
    need("PC+1+SEXT(IMM11)", c_jmp);
    need("PC = RS", c_rs);
    need("TRAP vector", c_trap);
    need("JSR target", c_jsr);
    need("regInputMux ALU", c_rin_alu);
    need("regInputMux data", c_rin_data);
    need("regInputMux PC+1", c_rin_pc1);
    need("store", c_store);
    need("load of stored word", c_load_stored);
    need("privilege set", c_priv_set);
    need("privilege clear", c_priv_clr);
    need("NZP N", c_nzp_n);
    need("NZP Z", c_nzp_z);
    need("NZP P", c_nzp_p);
    need("unassigned opcode", c_illegal);
    need("divide by zero", c_div0);
    foreach (ALU_OPS[k]) need($sformatf("ALU.CTL %0d", ALU_OPS[k]), c_alu[ALU_OPS[k]]);
    $display("cycles=%0d retired=%0d taken=%0d not_taken=%0d jmp=%0d rs=%0d trap=%0d jsr=%0d",
             cycles, retired, c_br_taken, c_br_not, c_jmp, c_rs, c_trap, c_jsr);
    $display("stores=%0d loads_of_stored=%0d priv_set=%0d priv_clr=%0d illegal=%0d div0=%0d",
             c_store, c_load_stored, c_priv_set, c_priv_clr, c_illegal, c_div0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
