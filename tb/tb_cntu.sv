// tb_cntu: self-checking testbench for cntu, the control unit. Drives st
// and zi at random (zi mostly low so that the multiply state lasts several
// clocks) and compares state, op-code word and rdy every clock with a
// reference state machine in the testbench. Also checks the asynchronous
// reset to SI in the middle of operation, and that every state and every
// transition was reached.
module tb_cntu;
  import wsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic st, zi, rdy;
  op_t op;
  state_e stt, ref_s;
  int checks = 0, failures = 0;
  int n_si_wait = 0, n_si_sm = 0, n_sm_wait = 0, n_sm_sf = 0, n_sf_wait = 0, n_sf_si = 0;
  int n_async = 0;

  cntu dut (.clk, .rst_n, .st, .zi, .op, .rdy, .stt);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic op_t exp_op(state_e s);
    case (s)
      SI:      return '{dop: D_LOAD, aop: A_RESET, qop: Q_LOAD, sop: S_RESET};
      SM:      return '{dop: D_NOP, aop: A_LDASHR, qop: Q_SHR, sop: S_CNT};
      default: return '{dop: D_NOP, aop: A_NOP, qop: Q_NOP, sop: S_NOP};
    endcase
  endfunction

  task automatic check_outputs();
    checks++;
    if (stt !== ref_s) begin failures++; $display("state %s expected %s", stt.name(), ref_s.name()); end
    checks++;
    if (op !== exp_op(ref_s)) begin failures++; $display("op %b in state %s", op, ref_s.name()); end
    checks++;
    if (rdy !== (ref_s == SF)) begin failures++; $display("rdy %b in state %s", rdy, ref_s.name()); end
  endtask

  initial begin
    st = 0; zi = 0; ref_s = SI;
    #12 rst_n = 1;
    // the literal op-code values of the design: SI -> 1101010, SM -> 0010101
    @(negedge clk);
    checks++; if (op !== 7'b1_10_10_10) failures++;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check_outputs();
      st = 1'($urandom_range(0, 2) != 0);
      zi = ($urandom_range(0, 3) == 0);
      if (i % 500 == 250) begin
        // asynchronous reset between clock edges
        #2 rst_n = 0;
        #1;
        checks++; if (stt !== SI) failures++;
        n_async++;
        ref_s = SI;
        #1 rst_n = 1;
      end
      @(posedge clk); #1;
      case (ref_s)
        SI: if (st) begin ref_s = SM; n_si_sm++; end else n_si_wait++;
        SM: if (zi) begin ref_s = SF; n_sm_sf++; end else n_sm_wait++;
        default: if (!st) begin ref_s = SI; n_sf_si++; end else n_sf_wait++;
      endcase
      #1;
    end
    $display("transitions: SI wait %0d, SI->SM %0d, SM stay %0d, SM->SF %0d, SF wait %0d, SF->SI %0d, async reset %0d",
             n_si_wait, n_si_sm, n_sm_wait, n_sm_sf, n_sf_wait, n_sf_si, n_async);
    checks += 7;
    if (n_si_wait == 0) failures++;
    if (n_si_sm == 0) failures++;
    if (n_sm_wait == 0) failures++;
    if (n_sm_sf == 0) failures++;
    if (n_sf_wait == 0) failures++;
    if (n_sf_si == 0) failures++;
    if (n_async == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
