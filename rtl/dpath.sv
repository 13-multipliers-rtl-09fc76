// dpath: datapath of the word-serial Booth multiplier.
//
// Holds the variables of the one-bit Booth algorithm in registers and
// updates them under the 7-bit op-code from the controller:
//   D  (d_reg)        multiplicand, M bits
//   A  (a_reg)        upper half of the partial product, M bits
//   Q  (q_reg)        multiplier and lower half of the partial product,
//                     N+1 bits with the Booth bit q-1 at the bottom
//   Sc (step_counter) counts the N steps and raises zi on the last one
//   F  (alu)          A, A+D or A-D, selected by Fop = {q0, q-1}
// In one multiplication step the concatenation (F, Q) is shifted right
// arithmetically by one place and loaded back into (A, Q): A takes F/2 and
// the bit f0 enters Q at the top. The ALU is driven straight from the two
// low bits of Q, not by the op-code. The product is read as aq = (A, Q
// without q-1). This structure is the design's; the ALU guard bit (see alu)
// and the register resets are this implementation's.
//
// Timing: all registers update on the rising edge of clk; zi and aq are
// register outputs (zi through a comparator).
module dpath
  import wsm_pkg::*;
#(
  parameter int unsigned N = 8,  // multiplier width (= number of steps)
  parameter int unsigned M = 8   // multiplicand width
) (
  input  logic           clk,
  input  logic           rst_n,  // asynchronous reset, active low
  input  op_t            op,     // {Dop, Aop, Qop, Sop}
  input  logic [N-1:0]   qq,     // multiplier
  input  logic [M-1:0]   dd,     // multiplicand
  output logic [N+M-1:0] aq,     // product register (A, Q)
  output logic           zi      // last step (Sc == N-1)
);

  logic [M-1:0] d, a;
  logic [N:0]   q;
  logic [M:0]   f;
  fop_e         fop;

  d_reg #(.M(M)) u_d (
    .clk, .rst_n, .dop(op.dop), .dd, .d
  );

  a_reg #(.M(M)) u_a (
    .clk, .rst_n, .aop(op.aop), .f, .a
  );

  q_reg #(.N(N)) u_q (
    .clk, .rst_n, .qop(op.qop), .qq, .f0(f[0]), .q, .fop
  );

  step_counter #(.N(N)) u_sc (
    .clk, .rst_n, .sop(op.sop), .zi
  );

  alu #(.M(M)) u_f (
    .fop, .a, .d, .f
  );

  assign aq = {a, q[N:1]};

endmodule
