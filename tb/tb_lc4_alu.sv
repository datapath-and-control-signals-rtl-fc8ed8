// tb_lc4_alu: self-checking test of the LC4 ALU and its B-input multiplexer.
//
// For every ALU.CTL code of the operation table (and some unused codes) the
// bench applies directed corner values and random operands, with both
// settings of ALUInputMux, and compares the result with a reference that is
// computed here with plain integer arithmetic. The ALU is combinational, so
// each vector is checked 1 ns after it is applied.
module tb_lc4_alu;
  import lc4_pkg::*;

  word_t       rs_data, rt_data, insn, result;
  alu_in_mux_e alu_in_mux;
  alu_ctl_e    alu_ctl;
  int checks = 0, failures = 0;

  lc4_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(int v, int bits);
    int m = 1 << (bits - 1);
    v = v & ((1 << bits) - 1);
    return (v ^ m) - m;
  endfunction

  function automatic int cc(longint x, longint y);
    return (x < y) ? 'hFFFF : (x == y) ? 0 : 1;
  endfunction

  function automatic int ref_alu(int code, int a, int b);
    int sa = sx(a, 16);
    case (code)
      0:  return (a + b) & 'hFFFF;
      1:  return (a * b) & 'hFFFF;
      2:  return (a - b) & 'hFFFF;
      3:  return (b == 0) ? 0 : a / b;
      4:  return (b == 0) ? 0 : a % b;
      5:  return (a + sx(b, 5)) & 'hFFFF;
      6:  return (a + sx(b, 6)) & 'hFFFF;
      8:  return a & b;
      9:  return (~a) & 'hFFFF;
      10: return a | b;
      11: return a ^ b;
      12: return a & sx(b, 5) & 'hFFFF;
      16: return cc(sa, sx(b, 16));
      17: return cc(a, b);
      18: return cc(sa, sx(b, 7));
      19: return cc(a, sx(b, 7) & 'hFFFF);
      24: return (a << (b % 16)) & 'hFFFF;
      25: return (sa >>> (b % 16)) & 'hFFFF;
      26: return a >> (b % 16);
      32: return sx(b, 9) & 'hFFFF;
      33: return (a & 'hFF) | ((b & 'hFF) << 8);
      default: return 0;
    endcase
  endfunction

  localparam int CODES[23] = '{0,1,2,3,4,5,6,8,9,10,11,12,16,17,18,19,24,25,26,32,33,7,40};

  task automatic apply(int code, word_t a, word_t rt, word_t i, logic sel);
    int b, exp;
    rs_data = a; rt_data = rt; insn = i;
    alu_in_mux = alu_in_mux_e'(sel);
    alu_ctl = alu_ctl_e'(code[5:0]);
    #1;
    b = sel ? int'(i) : int'(rt);
    exp = ref_alu(code, int'(a), b);
    checks++;
    if (int'(result) != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL code=%0d a=%h b=%h sel=%0d got=%h exp=%h", code, a, b, sel, result, exp[15:0]);
    end
  endtask

  localparam word_t CORNER[8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h0040, 16'hFFC0, 16'h00FF};

  initial begin
    foreach (CODES[c]) begin
      foreach (CORNER[x]) foreach (CORNER[y]) begin
        apply(CODES[c], CORNER[x], CORNER[y], 16'h0000, 1'b0);
        apply(CODES[c], CORNER[x], 16'h0000, CORNER[y], 1'b1);
      end
      repeat (400) apply(CODES[c], word_t'($urandom), word_t'($urandom), word_t'($urandom), 1'($urandom));
    end
    // A few values written out by hand.
    apply(2, 16'd7, 16'd9, 16'h0, 0);            // 7-9 = -2
    if (result != 16'hFFFE) failures++;
    checks++;
    apply(18, 16'hFFFF, 16'h0, 16'h007F, 1);     // -1 vs SEXT(0x7F) = -1 -> 0
    if (result != 16'h0000) failures++;
    checks++;
    apply(33, 16'h1234, 16'h0, 16'h00AB, 1);     // HICONST -> 0xAB34
    if (result != 16'hAB34) failures++;
    checks++;
    apply(32, 16'h0, 16'h0, 16'h0100, 1);        // CONST -256
    if (result != 16'hFF00) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
