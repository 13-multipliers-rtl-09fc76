// d_reg: the multiplicand register D of the word-serial multiplier.
//
// An M-bit register with two operations selected by Dop: nop (hold) and
// load (D <= dd). The operation table is the design's; the asynchronous
// active-low reset to zero is an addition of this implementation (the
// register is always loaded before it is used, so the reset value does not
// affect any product).
//
// Timing: D changes on the rising edge of clk after Dop = D_LOAD.
module d_reg
  import wsm_pkg::*;
#(
  parameter int unsigned M = 8   // multiplicand width
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous reset, active low
  input  dop_e         dop,    // D_NOP or D_LOAD
  input  logic [M-1:0] dd,     // multiplicand input
  output logic [M-1:0] d       // register contents
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              d <= '0;
    else if (dop == D_LOAD)  d <= dd;
  end

endmodule
