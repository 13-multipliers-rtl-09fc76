// wsm: word-serial multiplication processor using the one-bit Booth
// algorithm.
//
// Multiplies the N-bit two's-complement multiplier qq by the M-bit
// two's-complement multiplicand dd and delivers the N+M-bit product on aq.
// It consists of the datapath (dpath), which does one Booth step per clock
// with a single adder/subtractor, and the control unit (cntu), which
// sequences the steps and handles the start/ready handshake.
//
// Handshake: while idle the processor reloads qq and dd on every clock.
// Raise st with the operands valid; the edge that samples st = 1 takes the
// operands, the next N edges perform the N Booth steps, and after the last
// one rdy goes high with the product on aq, N+1 clock edges after the one
// that sampled st. aq and rdy then hold until st is lowered; the next edge
// returns the processor to the idle state. rst is the design's asynchronous
// active-low reset.
//
// Structure, ports, op-codes and defaults (8 x 8 bits) are the design's;
// the one-bit guard on the ALU output, which makes the multiplicand
// -2^(M-1) work, and the reset of the datapath registers are this
// implementation's.
module wsm
  import wsm_pkg::*;
#(
  parameter int unsigned N = 8,  // multiplier width
  parameter int unsigned M = 8   // multiplicand width
) (
  input  logic           clk,
  input  logic           rst,  // asynchronous reset, active low
  input  logic           st,   // start
  input  logic [N-1:0]   qq,   // multiplier
  input  logic [M-1:0]   dd,   // multiplicand
  output logic [N+M-1:0] aq,   // product
  output logic           rdy   // product valid
);

  op_t    op;
  logic   zi;
  state_e stt;

  dpath #(.N(N), .M(M)) u_dpath (
    .clk, .rst_n(rst), .op, .qq, .dd, .aq, .zi
  );

  cntu u_cntu (
    .clk, .rst_n(rst), .st, .zi, .op, .rdy, .stt
  );

  // In the multiply state the op-code must be the multiplication step.
  a_mult_op: assert property (@(posedge clk) disable iff (!rst)
      stt == SM |-> (op.aop == A_LDASHR && op.qop == Q_SHR && op.sop == S_CNT))
    else $error("wsm: wrong op-code in multiply state");

endmodule
