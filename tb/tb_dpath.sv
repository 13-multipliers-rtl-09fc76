// tb_dpath: self-checking testbench for dpath, the datapath on its own.
// The testbench plays the controller: one clock of load op-codes, then N
// clocks of multiply-step op-codes (ldAshr, shrQ, count). It checks after
// every step that (A,Q) equals the Booth partial product computed in the
// testbench, that zi is high exactly on the last step, and that the final
// (A,Q) equals qq * dd. Operands are random plus the corner values.
module tb_dpath;
  import wsm_pkg::*;
  localparam int N = 8, M = 8;
  logic clk = 0, rst_n = 0;
  op_t op;
  logic [N-1:0] qq;
  logic [M-1:0] dd;
  logic [N+M-1:0] aq;
  logic zi;
  int checks = 0, failures = 0;

  localparam op_t OP_LOAD = '{dop: D_LOAD, aop: A_RESET, qop: Q_LOAD, sop: S_RESET};
  localparam op_t OP_STEP = '{dop: D_NOP, aop: A_LDASHR, qop: Q_SHR, sop: S_CNT};
  localparam op_t OP_NOP  = '{dop: D_NOP, aop: A_NOP, qop: Q_NOP, sop: S_NOP};

  dpath #(.N(N), .M(M)) dut (.clk, .rst_n, .op, .qq, .dd, .aq, .zi);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] q_in, input logic [M-1:0] d_in);
    longint p, expp;
    int qv, dv, digit;
    @(negedge clk);
    op = OP_LOAD; qq = q_in; dd = d_in;
    @(negedge clk);
    qq = N'($urandom); dd = M'($urandom);   // operands no longer used
    qv = int'($signed(q_in)); dv = int'($signed(d_in));
    p = 0;
    for (int i = 0; i < N; i++) begin
      op = OP_STEP;
      checks++;
      if (zi !== (i == N-1)) begin failures++; $display("zi wrong at step %0d", i); end
      @(negedge clk);
      // reference: P[i+1] = (P[i] + digit * D * 2^N) / 2, digit = q_{i-1} - q_i
      digit = ((i == 0) ? 0 : ((qv >>> (i-1)) & 1)) - ((qv >>> i) & 1);
      p = (p + longint'(digit) * longint'(dv) * (longint'(1) << N)) >>> 1;
      // only the new bits of P are meaningful at step i; compare the upper
      // M + i + 1 bits
      checks++;
      if ((longint'($signed(aq)) >>> (N-1-i)) != (p >>> (N-1-i))) begin
        failures++;
        $display("step %0d: aq=%h expected partial %h", i, aq, p);
      end
    end
    op = OP_NOP;
    expp = longint'(qv) * longint'(dv);
    @(negedge clk);
    checks++;
    if (longint'($signed(aq)) != expp) begin
      failures++;
      $display("product %0d * %0d: got %0d", qv, dv, $signed(aq));
    end
  endtask

  initial begin
    op = OP_NOP; qq = '0; dd = '0;
    #12 rst_n = 1;
    run(8'h53, 8'h65);
    run(8'h80, 8'h80);
    run(8'h7f, 8'h80);
    run(8'h80, 8'h7f);
    run(8'hff, 8'hff);
    run(8'h00, 8'h80);
    for (int k = 0; k < 3000; k++) run(N'($urandom), M'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
