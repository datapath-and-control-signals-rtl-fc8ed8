// tb_lc4_privilege: self-checking test of the privilege bit PSR[15].
//
// After reset the bit must be 1 (supervisor). A random sequence of
// Privilege.CTL values is then applied, one per clock, and the bit is
// compared after every edge with a model kept in the bench: 0 clears, 1
// sets, 2 keeps.
module tb_lc4_privilege;
  import lc4_pkg::*;

  logic clk = 0, rst, psr15;
  priv_ctl_e priv_ctl;
  int checks = 0, failures = 0;

  lc4_privilege dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp);
    checks++;
    if (psr15 !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL ctl=%0d got=%b exp=%b", priv_ctl, psr15, exp);
    end
  endtask

  initial begin
    logic model;
    rst = 1; priv_ctl = PRIV_CLEAR;
    @(posedge clk); #1;
    check(1'b1);
    rst = 0; model = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      priv_ctl = priv_ctl_e'($urandom_range(0, 2));
      if ($urandom_range(0, 1)) priv_ctl = PRIV_KEEP;
      @(posedge clk); #1;
      if (priv_ctl == PRIV_CLEAR) model = 1'b0;
      else if (priv_ctl == PRIV_SET) model = 1'b1;
      check(model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
