// lc4_reg_input_mux: regInputMux, which chooses the value written back into
// the register file (and seen by the NZP tester).
//
// Select 0 passes the ALU result (arithmetic, logical, shift, compare and
// constant instructions), 1 the data memory output (loads) and 2 the value
// PC+1 (instructions that save a return address in R7). The encoding is the
// one of the datapath figure. The select value 3 is not used by the design;
// here it yields the ALU result. Purely combinational.
module lc4_reg_input_mux
  import lc4_pkg::*;
(
  input  reg_in_mux_e sel,        // regInputMux.CTL
  input  word_t       alu_result, // input 0
  input  word_t       data_out,   // input 1
  input  word_t       pc_plus1,   // input 2
  output word_t       wdata       // to the register file Write Input
);

  always_comb begin
    unique case (sel)
      RIN_DATA: wdata = data_out;
      RIN_PC1:  wdata = pc_plus1;
      default:  wdata = alu_result;
    endcase
  end

endmodule
