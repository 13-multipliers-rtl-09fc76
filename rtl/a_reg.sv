// a_reg: the partial product register A, the upper half of the product
// register (A,Q) of the word-serial multiplier.
//
// Operations selected by Aop: nop (hold), ldAshr (load the ALU output F
// shifted right arithmetically by one place, A <= F/2) and reset (A <= 0,
// for codes 2 and 3). The least significant ALU bit f0 is not stored here;
// it moves into the multiplier register Q.
//
// F arrives one bit wider than A (M+1 bits, see alu): this implementation
// keeps a guard bit so that A - D cannot overflow. Dropping f0 from the
// M+1-bit F leaves exactly the M-bit value asr(F). The design itself
// describes an M-bit F with A <= (F(M-1), F(M-1..1)); with the guard bit the
// two agree for every operand except a multiplicand of -2^(M-1).
// The asynchronous active-low reset is this implementation's addition.
//
// Timing: A changes on the rising edge of clk.
module a_reg
  import wsm_pkg::*;
#(
  parameter int unsigned M = 8   // multiplicand width = width of A
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous reset, active low
  input  aop_e         aop,    // A_NOP, A_LDASHR, A_RESET(3)
  input  logic [M:0]   f,      // ALU output with guard bit
  output logic [M-1:0] a       // register contents
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a <= '0;
    else begin
      unique case (aop)
        A_NOP:              a <= a;
        A_LDASHR:           a <= f[M:1];   // asr(F), f0 goes to Q
        A_RESET, A_RESET3:  a <= '0;
      endcase
    end
  end

endmodule
