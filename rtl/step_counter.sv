// step_counter: the step counter Sc of the word-serial multiplier.
//
// Counts the Booth steps. Operations selected by Sop: nop (hold), count
// (Sc <= Sc + 1) and reset (Sc <= 0, for codes 2 and 3). The flag zi is
// high while Sc = N-1, i.e. during the last of the N multiplication steps;
// the controller leaves the multiply state on it. Operations and flag are
// the design's; the counter width ceil(log2 N) (at least one bit), the wrap
// on overflow and the asynchronous active-low reset are this
// implementation's choices.
//
// Timing: Sc changes on the rising edge of clk; zi is combinational from Sc.
module step_counter
  import wsm_pkg::*;
#(
  parameter int unsigned N = 8   // number of multiplication steps
) (
  input  logic clk,
  input  logic rst_n,  // asynchronous reset, active low
  input  sop_e sop,    // S_NOP, S_CNT, S_RESET(3)
  output logic zi      // Sc == N-1
);

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [SW-1:0] sc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sc <= '0;
    else begin
      unique case (sop)
        S_NOP:              sc <= sc;
        S_CNT:              sc <= sc + 1'b1;
        S_RESET, S_RESET3:  sc <= '0;
      endcase
    end
  end

  assign zi = (sc == SW'(N - 1));

endmodule
