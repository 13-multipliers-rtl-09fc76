// tb_wsm: end-to-end testbench of the word-serial Booth multiplier at its
// default size (8 x 8 bits), exhaustive over all 65536 operand pairs.
//
// Each multiplication follows the start/ready handshake: operands and
// st = 1 are applied together, rdy must rise exactly N+1 clock edges after
// the edge that sampled st, aq must then equal qq * dd (signed) and hold
// while st stays high, and rdy must fall one edge after st is lowered.
// Operands are changed after the start edge to show they are not used any
// more. The testbench counts how often each mechanism of the design
// occurred and fails if one never did: ALU add, subtract and pass steps,
// waiting in the idle state with st low, holding the result in the final
// state with st high, the asynchronous reset in the middle of a
// multiplication, and the multiplicand -2^(M-1) (which needs the ALU guard
// bit).
module tb_wsm;
  import wsm_pkg::*;
  localparam int N = 8, M = 8;
  logic clk = 0, rst = 0;
  logic st;
  logic [N-1:0] qq;
  logic [M-1:0] dd;
  logic [N+M-1:0] aq;
  logic rdy;
  int checks = 0, failures = 0;
  logic [N+M-1:0] last_result;
  int n_add = 0, n_sub = 0, n_pass = 0, n_idle = 0, n_hold = 0, n_reset = 0, n_dmin = 0;

  wsm dut (.clk, .rst, .st, .qq, .dd, .aq, .rdy);

  always #5 clk = ~clk;

  // count the Booth digit used in every multiplication step
  always @(posedge clk)
    if (rst && dut.u_cntu.stt == SM)
      case (dut.u_dpath.fop)
        F_ADD:   n_add++;
        F_SUB:   n_sub++;
        default: n_pass++;
      endcase

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic multiply(input logic [N-1:0] q_in, input logic [M-1:0] d_in,
                          input int hold, input int idle);
    int edges;
    longint expp;
    logic [N+M-1:0] result;
    @(negedge clk);
    qq = q_in; dd = d_in; st = 1;
    @(posedge clk);              // this edge samples st and the operands
    @(negedge clk);
    qq = N'($urandom); dd = M'($urandom);
    edges = 1;
    while (!rdy && edges < 4 * N) begin
      @(posedge clk); edges++;
      #1;
    end
    checks++;
    if (edges != N + 1) begin
      failures++;
      $display("latency %0d edges, expected %0d", edges, N + 1);
    end
    expp = longint'($signed(q_in)) * longint'($signed(d_in));
    checks++;
    if (longint'($signed(aq)) != expp) begin
      failures++;
      if (failures < 20)
        $display("%0d * %0d: got %0d expected %0d", $signed(q_in), $signed(d_in), $signed(aq), expp);
    end
    if (d_in == {1'b1, {(M-1){1'b0}}}) n_dmin++;
    result = aq;
    last_result = aq;
    // hold the final state with st high
    for (int h = 0; h < hold; h++) begin
      @(posedge clk); #1;
      checks += 2;
      if (!rdy) failures++;
      if (aq !== result) failures++;
      n_hold++;
    end
    @(negedge clk);
    st = 0;
    @(posedge clk); #1;
    checks++;
    if (rdy) begin failures++; $display("rdy still high after st low"); end
    // wait in the idle state with st low
    for (int w = 0; w < idle; w++) begin
      @(posedge clk); #1;
      checks++;
      if (rdy) failures++;
      n_idle++;
    end
  endtask

  initial begin
    st = 0; qq = '0; dd = '0;
    #12 rst = 1;
    repeat (2) @(posedge clk);

    // the example of the design: 53h * 65h = 20BFh
    multiply(8'h53, 8'h65, 1, 1);
    checks++;
    if (last_result !== 16'h20BF) begin failures++; $display("53h * 65h gave %h", last_result); end

    // asynchronous reset in the middle of a multiplication, then a clean one
    @(negedge clk);
    qq = 8'h12; dd = 8'h34; st = 1;
    repeat (4) @(posedge clk);
    #2 rst = 0;
    #1;
    checks += 2;
    if (dut.u_cntu.stt != SI) failures++;
    if (rdy) failures++;
    n_reset++;
    @(negedge clk);
    st = 0;
    rst = 1;
    multiply(8'h12, 8'h34, 0, 0);

    // every operand pair
    for (int iq = 0; iq < (1 << N); iq++)
      for (int id = 0; id < (1 << M); id++)
        multiply(N'(iq), M'(id), $urandom_range(0, 1), $urandom_range(0, 1));

    $display("steps: add %0d, subtract %0d, pass %0d; idle waits %0d, result holds %0d, resets %0d, D=-2^(M-1) %0d",
             n_add, n_sub, n_pass, n_idle, n_hold, n_reset, n_dmin);
    checks += 7;
    if (n_add == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_pass == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_reset == 0) failures++;
    if (n_dmin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
