// tb_q_reg: self-checking testbench for q_reg, the multiplier register
// Q(n-1..-1). Checks load (q-1 cleared, both codes), shift right with f0
// entering at the top, nop, and that Fop equals {q0, q-1}.
module tb_q_reg;
  import wsm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  qop_e qop;
  logic [N-1:0] qq;
  logic f0;
  logic [N:0] q, ref_q;
  fop_e fop;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  q_reg #(.N(N)) dut (.clk, .rst_n, .qop, .qq, .f0, .q, .fop);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qop = Q_NOP; qq = '0; f0 = 0; ref_q = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      qop = qop_e'($urandom_range(0, 3));
      qq  = N'($urandom);
      f0  = 1'($urandom);
      @(posedge clk); #1;
      seen[qop]++;
      case (qop)
        Q_SHR:           ref_q = {f0, ref_q[N:1]};
        Q_LOAD, Q_LOAD3: ref_q = {qq, 1'b0};
        default: ;
      endcase
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("q_reg mismatch: qop=%0d q=%h expected %h", qop, q, ref_q);
      end
      checks++;
      if (fop !== fop_e'(ref_q[1:0])) failures++;
    end
    foreach (seen[k]) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
