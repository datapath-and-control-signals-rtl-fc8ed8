// tb_lc4_reg_input_mux: self-checking test of regInputMux.
//
// Random values are placed on the three inputs and each select value is
// applied in turn: 0 must pass the ALU result, 1 the data memory output and
// 2 the PC+1 value.
module tb_lc4_reg_input_mux;
  import lc4_pkg::*;

  reg_in_mux_e sel;
  word_t alu_result, data_out, pc_plus1, wdata;
  int checks = 0, failures = 0;

  lc4_reg_input_mux dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    for (int n = 0; n < 1000; n++) begin
      alu_result = word_t'($urandom);
      data_out   = word_t'($urandom);
      pc_plus1   = word_t'($urandom);
      for (int s = 0; s < 3; s++) begin
        sel = reg_in_mux_e'(s);
        exp = (s == 0) ? alu_result : (s == 1) ? data_out : pc_plus1;
        #1;
        checks++;
        if (wdata !== exp) begin
          failures++;
          if (failures < 20) $display("FAIL sel=%0d got=%h exp=%h", s, wdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
