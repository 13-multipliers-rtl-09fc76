// alu: the adder/subtractor F of the word-serial multiplier.
//
// Combinational. Fop, which is the Booth digit pair {q0, q-1} read straight
// from the multiplier register, selects F = A (codes 0 and 3, Booth digit
// 0), F = A + D (code 1, digit +1) or F = A - D (code 2, digit -1). The
// subtraction is done as A + ~D + 1, the way the design's worked example
// shows it.
//
// The operation table is the design's. The result width is this
// implementation's choice: A and D are sign-extended to M+1 bits and F is
// M+1 bits wide, so that A - D never overflows (the M-bit ALU of the design
// overflows when D = -2^(M-1)). The register A then takes F without its
// bit 0, which is asr(F) in M bits.
module alu
  import wsm_pkg::*;
#(
  parameter int unsigned M = 8   // operand width
) (
  input  fop_e         fop,  // F_PASS(3), F_ADD, F_SUB
  input  logic [M-1:0] a,    // partial product register A
  input  logic [M-1:0] d,    // multiplicand register D
  output logic [M:0]   f     // result with guard bit
);

  logic [M:0] ax, dx;

  always_comb begin
    ax = {a[M-1], a};
    dx = {d[M-1], d};
    unique case (fop)
      F_ADD:            f = ax + dx;
      F_SUB:            f = ax + ~dx + 1'b1;
      F_PASS, F_PASS3:  f = ax;
    endcase
  end

endmodule
