// tb_lc4_prog_mem: self-checking test of the program memory at its full
// 2^16 word size.
//
// The whole memory is filled through the load port with a word computed
// from its address, (addr * 40503) ^ 0x5A5A truncated to 16 bits, then every
// address is presented on pc and the instruction read back combinationally
// is compared with the same formula. Finally one word is overwritten and
// re-read.
module tb_lc4_prog_mem;
  import lc4_pkg::*;

  logic  clk = 0, load_we;
  word_t pc, insn, load_addr, load_data;
  int checks = 0, failures = 0;

  lc4_prog_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pattern(int a);
    return word_t'((a * 40503) ^ 'h5A5A);
  endfunction

  initial begin
    load_we = 1; pc = 0;
    for (int a = 0; a < 65536; a++) begin
      load_addr = word_t'(a); load_data = pattern(a);
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int a = 0; a < 65536; a++) begin
      pc = word_t'(a); #1;
      checks++;
      if (insn !== pattern(a)) begin
        failures++;
        if (failures < 20) $display("FAIL pc=%h got=%h exp=%h", pc, insn, pattern(a));
      end
    end
    load_we = 1; load_addr = 16'h8200; load_data = 16'hF0FF; pc = 16'h8200;
    @(posedge clk); #1; load_we = 0;
    checks++;
    if (insn !== 16'hF0FF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
