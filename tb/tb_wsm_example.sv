// tb_wsm_example: replays the 6 x 6-bit worked example of the one-bit
// Booth algorithm on a wsm instance with N = M = 6: D = 101101 (-19),
// QQ = 101001 (-23). Before each of the six multiplication steps it checks
// the Booth digit (ALU op-code) and the ALU output F, after each step the
// partial product register A, and at the end the product 437 and the
// latency of N+1 clock edges. The expected values are the ones of the hand
// calculation, not taken from the design.
module tb_wsm_example;
  import wsm_pkg::*;
  localparam int N = 6, M = 6;
  logic clk = 0, rst = 0;
  logic st;
  logic [N-1:0] qq;
  logic [M-1:0] dd;
  logic [N+M-1:0] aq;
  logic rdy;
  int checks = 0, failures = 0;

  // digit -1 -> subtract, +1 -> add, 0 -> pass
  localparam fop_e  EXP_FOP [N] = '{F_SUB, F_ADD, F_PASS, F_SUB, F_ADD, F_SUB};
  // ALU output in 6 bits at each step
  localparam logic [5:0] EXP_F [N] = '{6'b010011, 6'b110110, 6'b111011,
                                       6'b010000, 6'b110101, 6'b001101};
  // A after each step, A[1] .. A[6]
  localparam logic [5:0] EXP_A [N] = '{6'b001001, 6'b111011, 6'b111101,
                                       6'b001000, 6'b111010, 6'b000110};

  wsm #(.N(N), .M(M)) dut (.clk, .rst, .st, .qq, .dd, .aq, .rdy);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    st = 0; qq = '0; dd = '0;
    #12 rst = 1;
    @(negedge clk);
    dd = 6'b101101; qq = 6'b101001; st = 1;
    @(posedge clk);                       // operands taken
    edges = 1;
    #1;
    for (int i = 0; i < N; i++) begin
      checks += 3;
      if (dut.u_cntu.stt != SM) failures++;
      if (dut.u_dpath.fop != EXP_FOP[i]) begin
        failures++; $display("step %0d: Booth digit code %b", i, dut.u_dpath.fop);
      end
      if (dut.u_dpath.f[5:0] != EXP_F[i]) begin
        failures++; $display("step %0d: F = %b expected %b", i, dut.u_dpath.f[5:0], EXP_F[i]);
      end
      @(posedge clk); edges++; #1;
      checks++;
      if (aq[N+M-1:N] != EXP_A[i]) begin
        failures++; $display("step %0d: A = %b expected %b", i, aq[N+M-1:N], EXP_A[i]);
      end
    end
    checks += 3;
    if (!rdy) begin failures++; $display("rdy not high after %0d edges", edges); end
    if (edges != N + 1) failures++;
    if (aq != 12'b000110_110101 || $signed(aq) != 437) begin
      failures++; $display("product %0d expected 437", $signed(aq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
