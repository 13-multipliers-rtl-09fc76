// tb_a_reg: self-checking testbench for a_reg, the partial product
// register. Applies random op-codes and ALU values and checks nop, reset
// (both codes) and the arithmetic shift right of the M+1-bit ALU output
// against a signed-arithmetic reference (A = F >>> 1).
module tb_a_reg;
  import wsm_pkg::*;
  localparam int M = 8;
  logic clk = 0, rst_n = 0;
  aop_e aop;
  logic [M:0]   f;
  logic [M-1:0] a, ref_a;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  a_reg #(.M(M)) dut (.clk, .rst_n, .aop, .f, .a);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aop = A_NOP; f = '0; ref_a = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      aop = aop_e'($urandom_range(0, 3));
      // keep F within the range a Booth step can produce
      f   = (M+1)'($signed($urandom_range(0, (1 << (M+1)) - 1)) - (1 << M));
      @(posedge clk); #1;
      seen[aop]++;
      case (aop)
        A_LDASHR: ref_a = M'($signed(f) >>> 1);
        A_RESET, A_RESET3: ref_a = '0;
        default: ;
      endcase
      checks++;
      if (a !== ref_a) begin
        failures++;
        $display("a_reg mismatch: aop=%0d f=%h a=%h expected %h", aop, f, a, ref_a);
      end
    end
    foreach (seen[k]) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
