// tb_lc4_data_mem: self-checking test of the data memory at its full 2^16
// word size.
//
// Random stores and loads are issued against a shadow associative array
// kept in the bench. A store (DATA.WE = 1) must change the addressed word at
// the clock edge only, a load is combinational, and a cycle with DATA.WE = 0
// must leave memory unchanged. Only addresses already written are compared.
module tb_lc4_data_mem;
  import lc4_pkg::*;

  logic  clk = 0, data_we;
  word_t addr, wdata, rdata;
  int checks = 0, failures = 0;
  word_t shadow [word_t];

  lc4_data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s addr=%h got=%h exp=%h", what, addr, got, exp);
    end
  endtask

  initial begin
    word_t old;
    data_we = 0; addr = 0; wdata = 0;
    // Write the two ends and a spread of addresses.
    for (int n = 0; n < 20000; n++) begin
      addr  = (n < 2) ? (n == 0 ? 16'h0000 : 16'hFFFF) :
              ($urandom_range(0, 1) ? word_t'($urandom) : word_t'($urandom_range(0, 63)));
      wdata = word_t'($urandom);
      data_we = ($urandom_range(0, 1) == 1) || n < 2;
      #1;
      if (shadow.exists(addr)) check("load before edge", rdata, shadow[addr]);
      old = rdata;
      @(posedge clk); #1;
      if (data_we) begin
        shadow[addr] = wdata;
        check("after store", rdata, wdata);
      end else begin
        check("no store", rdata, old);
      end
    end
    data_we = 0;
    foreach (shadow[a]) begin
      addr = a; #1;
      check("final sweep", rdata, shadow[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
