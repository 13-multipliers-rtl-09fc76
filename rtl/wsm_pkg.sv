// wsm_pkg: op-codes, op-code word and controller states shared by the
// word-serial Booth multiplier (wsm) and its parts.
//
// The 7-bit op-code word op[6:0] = {Dop, Aop, Qop, Sop} drives the four
// registers of the datapath; the ALU op-code Fop is not part of it, it is
// taken straight from the two low bits of the multiplier register,
// Fop = {q0, q-1}. The binary values follow the op-code tables of the
// design: for A, Q and Sc the codes 2 and 3 both mean reset/load, and for
// the ALU the codes 0 and 3 both mean pass. The state encoding SI=00,
// SM=01, SF=10 is the hard encoding the design uses for its controller.
package wsm_pkg;

  // multiplicand register D
  typedef enum logic {
    D_NOP  = 1'b0,   // D <= D
    D_LOAD = 1'b1    // D <= dd
  } dop_e;

  // partial product register A
  typedef enum logic [1:0] {
    A_NOP    = 2'd0, // A <= A
    A_LDASHR = 2'd1, // A <= asr(F)
    A_RESET  = 2'd2, // A <= 0
    A_RESET3 = 2'd3  // A <= 0 (alias)
  } aop_e;

  // multiplier register Q(n-1..-1)
  typedef enum logic [1:0] {
    Q_NOP   = 2'd0,  // Q <= Q
    Q_SHR   = 2'd1,  // Q <= shr(f0, Q)
    Q_LOAD  = 2'd2,  // Q <= (qq, 0)
    Q_LOAD3 = 2'd3   // Q <= (qq, 0) (alias)
  } qop_e;

  // step counter Sc
  typedef enum logic [1:0] {
    S_NOP    = 2'd0, // Sc <= Sc
    S_CNT    = 2'd1, // Sc <= Sc + 1
    S_RESET  = 2'd2, // Sc <= 0
    S_RESET3 = 2'd3  // Sc <= 0 (alias)
  } sop_e;

  // ALU; the code is the Booth digit pair {q0, q-1}
  typedef enum logic [1:0] {
    F_PASS  = 2'b00, // F <= A      (q0 q-1 = 00, digit 0)
    F_ADD   = 2'b01, // F <= A + D  (q0 q-1 = 01, digit +1)
    F_SUB   = 2'b10, // F <= A - D  (q0 q-1 = 10, digit -1)
    F_PASS3 = 2'b11  // F <= A      (q0 q-1 = 11, digit 0)
  } fop_e;

  // op[6] = Dop, op[5:4] = Aop, op[3:2] = Qop, op[1:0] = Sop
  typedef struct packed {
    dop_e dop;
    aop_e aop;
    qop_e qop;
    sop_e sop;
  } op_t;

  // controller states
  typedef enum logic [1:0] {
    SI = 2'b00,      // initial: load operands, wait for st
    SM = 2'b01,      // multiply: one Booth step per clock
    SF = 2'b10       // final: product valid, rdy high, wait for st low
  } state_e;

endpackage
