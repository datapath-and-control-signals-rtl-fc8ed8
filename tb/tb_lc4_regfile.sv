// tb_lc4_regfile: self-checking test of the register file and its rsMux,
// rtMux and rdMux address multiplexers.
//
// A shadow copy of R0..R7 is kept in the bench. Every cycle a random
// instruction word, random multiplexer settings and a random write are
// applied; the two combinational read ports are compared with the shadow
// copy (read addresses decoded here from the multiplexer encodings), then the
// clock edge commits the write to both. A read of the register being written
// must return the old value. Reset must clear all registers.
module tb_lc4_regfile;
  import lc4_pkg::*;

  logic      clk = 0, rst;
  word_t     insn, wdata, rs_data, rt_data;
  rs_mux_e   rs_mux;
  rt_mux_e   rt_mux;
  rd_mux_e   rd_mux;
  logic      regfile_we;
  reg_addr_t rd_addr;
  int checks = 0, failures = 0;
  word_t shadow [8];

  lc4_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    int rsa, rta, rda, sel;
    rst = 1; regfile_we = 0; insn = 0; wdata = 0;
    rs_mux = RS_I8_6; rt_mux = RT_I2_0; rd_mux = RD_I11_9;
    @(posedge clk); #1;
    rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int r = 0; r < 8; r++) begin
      insn = word_t'(r << 6); #1;
      check("reset value", rs_data, 16'h0);
    end
    for (int n = 0; n < 5000; n++) begin
      insn = word_t'($urandom);
      sel = $urandom_range(0, 2);
      rs_mux = rs_mux_e'(sel);
      rt_mux = rt_mux_e'($urandom_range(0, 1));
      rd_mux = rd_mux_e'($urandom_range(0, 1));
      regfile_we = ($urandom_range(0, 3) != 0);
      wdata = word_t'($urandom);
      rsa = (sel == 0) ? insn[8:6] : (sel == 1) ? 7 : insn[11:9];
      rta = (rt_mux == RT_I2_0) ? insn[2:0] : insn[11:9];
      rda = (rd_mux == RD_I11_9) ? insn[11:9] : 7;
      #1;
      check("rs_data", rs_data, shadow[rsa]);
      check("rt_data", rt_data, shadow[rta]);
      check("rd_addr", word_t'(rd_addr), word_t'(rda));
      @(posedge clk); #1;
      if (regfile_we) shadow[rda] = wdata;
    end
    // Reset clears everything again.
    rst = 1; @(posedge clk); #1; rst = 0; regfile_we = 0;
    for (int r = 0; r < 8; r++) begin
      rt_mux = RT_I2_0; insn = word_t'(r); #1;
      check("reset again", rt_data, 16'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
