// lc4_alu: the LC4 arithmetic logic unit together with its B-input
// multiplexer (ALUInputMux).
//
// Operand A is always RS. ALUInputMux chooses operand B: RT (0) or the whole
// instruction word I[15:0] (1); immediate operations cut their field out of B
// themselves (B[4:0], B[5:0], B[6:0], B[8:0], B[7:0]). ALU.CTL, six bits,
// selects one of the operations of the ALU table: add, multiply, subtract,
// divide, modulus, add of a 5- or 6-bit signed immediate, AND, NOT, OR, XOR,
// AND with a 5-bit immediate, four compares, three shifts by B[3:0], and the
// two constant operations CONST and HICONST. A compare returns the sign of
// A-B as -1 (0xFFFF), 0 or +1. The unit is purely combinational.
//
// Design choices not fixed by the source: divide and modulus treat both
// operands as unsigned and return 0 when B is 0; codes that the operation
// table leaves unused return 0. Operation 19 subtracts SEXT(B[6:0]) as the
// operation table states, then compares unsigned.
module lc4_alu
  import lc4_pkg::*;
(
  input  word_t       rs_data,     // A input, RS[15:0]
  input  word_t       rt_data,     // RT[15:0], B input when ALUInputMux = 0
  input  word_t       insn,        // I[15:0], B input when ALUInputMux = 1
  input  alu_in_mux_e alu_in_mux,  // ALUInputMux.CTL
  input  alu_ctl_e    alu_ctl,     // ALU.CTL
  output word_t       result       // C
);

  word_t a, b;

  // Three-way compare result as a 16-bit word: -1, 0 or +1.
  function automatic word_t cc_signed(word_t x, word_t y);
    if ($signed(x) < $signed(y)) return 16'hFFFF;
    else if (x == y)             return 16'h0000;
    else                         return 16'h0001;
  endfunction

  function automatic word_t cc_unsigned(word_t x, word_t y);
    if (x < y)       return 16'hFFFF;
    else if (x == y) return 16'h0000;
    else             return 16'h0001;
  endfunction

  always_comb begin
    a = rs_data;
    b = (alu_in_mux == ALUB_INSN) ? insn : rt_data;

    unique case (alu_ctl)
      ALU_ADD:     result = a + b;
      ALU_MUL:     result = a * b;
      ALU_SUB:     result = a - b;
      ALU_DIV:     result = (b == '0) ? '0 : a / b;
      ALU_MOD:     result = (b == '0) ? '0 : a % b;
      ALU_ADDI5:   result = a + {{11{b[4]}}, b[4:0]};
      ALU_ADDI6:   result = a + {{10{b[5]}}, b[5:0]};
      ALU_AND:     result = a & b;
      ALU_NOT:     result = ~a;
      ALU_OR:      result = a | b;
      ALU_XOR:     result = a ^ b;
      ALU_ANDI5:   result = a & {{11{b[4]}}, b[4:0]};
      ALU_CMP:     result = cc_signed(a, b);
      ALU_CMPU:    result = cc_unsigned(a, b);
      ALU_CMPI:    result = cc_signed(a, {{9{b[6]}}, b[6:0]});
      ALU_CMPIU:   result = cc_unsigned(a, {{9{b[6]}}, b[6:0]});
      ALU_SLL:     result = a << b[3:0];
      ALU_SRA:     result = word_t'($signed(a) >>> b[3:0]);
      ALU_SRL:     result = a >> b[3:0];
      ALU_CONST:   result = {{7{b[8]}}, b[8:0]};
      ALU_HICONST: result = (a & 16'h00FF) | {b[7:0], 8'h00};
      default:     result = '0;
    endcase
  end

endmodule
