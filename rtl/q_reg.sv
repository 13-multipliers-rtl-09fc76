// q_reg: the multiplier register Q(n-1..-1) of the word-serial multiplier,
// also the lower half of the product register (A,Q).
//
// An (N+1)-bit register. Bit q[0] holds the appended Booth bit q-1 and bit
// q[i+1] holds the multiplier digit q_i, since SystemVerilog ranges, like
// VHDL ones, cannot go below zero. Operations selected by Qop: nop (hold),
// shrQ (shift right one place, the ALU bit f0 entering at the top:
// Q <= (f0, Q(n-1..0))) and load (Q <= (qq, 0), for codes 2 and 3), which
// also clears q-1 as the Booth algorithm requires. The two low bits
// {q0, q-1} are the ALU op-code Fop. After N shifts, q[N:1] holds the low
// half of the product. These operations are the design's; the asynchronous
// active-low reset is this implementation's addition.
//
// Timing: Q changes on the rising edge of clk.
module q_reg
  import wsm_pkg::*;
#(
  parameter int unsigned N = 8   // multiplier width
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous reset, active low
  input  qop_e         qop,    // Q_NOP, Q_SHR, Q_LOAD(3)
  input  logic [N-1:0] qq,     // multiplier input
  input  logic         f0,     // least significant ALU output bit
  output logic [N:0]   q,      // {q_{n-1} .. q_0, q_{-1}}
  output fop_e         fop     // Booth digit pair {q0, q-1}
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else begin
      unique case (qop)
        Q_NOP:             q <= q;
        Q_SHR:             q <= {f0, q[N:1]};
        Q_LOAD, Q_LOAD3:   q <= {qq, 1'b0};
      endcase
    end
  end

  assign fop = fop_e'(q[1:0]);

endmodule
