// cntu: control unit of the word-serial Booth multiplier.
//
// A three-state Moore machine (two state bits):
//   SI  initial: D <= dd, A <= 0, Q <= (qq, 0), Sc <= 0, rdy low.
//       Stays while st = 0; the operands are reloaded on every clock, so
//       they must be valid at the clock edge that samples st = 1.
//   SM  multiply: A <= F/2, Q <= shr(f0, Q), Sc <= Sc + 1 on every clock;
//       goes to SF on the clock edge at which zi (Sc = N-1) is high, so
//       exactly N steps are done.
//   SF  final: all registers hold, rdy high; returns to SI when st = 0.
// The state machine, its op-codes and the hard state encoding SI=00, SM=01,
// SF=10 are the design's, as is the asynchronous reset to SI while rst_n
// is low. The unused code 11 is treated like SF.
//
// Interface: op = {Dop, Aop, Qop, Sop} as in wsm_pkg. Timing: op and rdy
// are decoded from the state register only.
module cntu
  import wsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,  // asynchronous reset, active low
  input  logic   st,     // start
  input  logic   zi,     // last multiplication step
  output op_t    op,     // op-code word for the datapath
  output logic   rdy,    // product ready
  output state_e stt     // current state (for observation)
);

  state_e nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stt <= SI;
    else        stt <= nxt;
  end

  always_comb begin
    nxt = stt;
    op  = '{dop: D_NOP, aop: A_NOP, qop: Q_NOP, sop: S_NOP};
    rdy = 1'b0;
    unique case (stt)
      SI: begin
        op = '{dop: D_LOAD, aop: A_RESET, qop: Q_LOAD, sop: S_RESET};
        if (st) nxt = SM;
      end
      SM: begin
        op = '{dop: D_NOP, aop: A_LDASHR, qop: Q_SHR, sop: S_CNT};
        if (zi) nxt = SF;
      end
      default: begin  // SF
        rdy = 1'b1;
        if (!st) nxt = SI;
      end
    endcase
  end

endmodule
