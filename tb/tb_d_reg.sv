// tb_d_reg: self-checking testbench for d_reg, the multiplicand register.
// Applies random load/nop op-codes and operands and compares the register
// with a reference value kept in the testbench after every clock edge.
module tb_d_reg;
  import wsm_pkg::*;
  localparam int M = 8;
  logic clk = 0, rst_n = 0;
  dop_e dop;
  logic [M-1:0] dd, d, ref_d;
  int checks = 0, failures = 0, loads = 0;

  d_reg #(.M(M)) dut (.clk, .rst_n, .dop, .dd, .d);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dop = D_NOP; dd = '0; ref_d = '0;
    #12 rst_n = 1;
    checks++; if (d !== '0) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      dop = dop_e'($urandom_range(0, 1));
      dd  = M'($urandom);
      @(posedge clk); #1;
      if (dop == D_LOAD) begin ref_d = dd; loads++; end
      checks++;
      if (d !== ref_d) begin
        failures++;
        $display("d_reg mismatch: d=%h expected %h", d, ref_d);
      end
    end
    checks++; if (loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
