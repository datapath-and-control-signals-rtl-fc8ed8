// lc4_privilege: the privilege bit PSR[15], which says whether the machine
// runs in supervisor mode (1) or user mode (0).
//
// Privilege.CTL decides, once per instruction, how the bit changes on the
// rising clock edge that ends the instruction: 0 clears it (RTI), 1 sets it
// (TRAP), 2 leaves it alone (every other instruction). The value 3 is not
// used by the design and also leaves the bit alone here.
//
// Design choice not fixed by the source: a synchronous active-high reset
// puts the machine in supervisor mode (RESET_PRIV = 1), so that it starts in
// operating-system code.
module lc4_privilege
  import lc4_pkg::*;
#(
  parameter logic RESET_PRIV = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  input  priv_ctl_e priv_ctl,  // Privilege.CTL
  output logic      psr15      // PSR[15]
);

  always_ff @(posedge clk) begin
    if (rst) psr15 <= RESET_PRIV;
    else begin
      unique case (priv_ctl)
        PRIV_CLEAR: psr15 <= 1'b0;
        PRIV_SET:   psr15 <= 1'b1;
        default:    psr15 <= psr15;
      endcase
    end
  end

endmodule
