// tb_alu: self-checking testbench for alu. Exhaustive over all 8-bit
// operand pairs and all four op-codes; the expected result is computed with
// signed integer arithmetic and compared with the sign-extended M+1-bit
// output.
module tb_alu;
  import wsm_pkg::*;
  localparam int M = 8;
  fop_e fop;
  logic [M-1:0] a, d;
  logic [M:0] f;
  int checks = 0, failures = 0;
  int expv;
  logic clk = 0;

  alu #(.M(M)) dut (.fop, .a, .d, .f);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int ia = 0; ia < (1 << M); ia++)
        for (int id = 0; id < (1 << M); id++) begin
          fop = fop_e'(op);
          a = M'(ia);
          d = M'(id);
          #1;
          case (op)
            1: expv = int'($signed(a)) + int'($signed(d));
            2: expv = int'($signed(a)) - int'($signed(d));
            default: expv = int'($signed(a));
          endcase
          checks++;
          if (int'($signed(f)) != expv) begin
            failures++;
            if (failures < 10)
              $display("alu mismatch: op=%0d a=%0d d=%0d f=%0d expected %0d",
                       op, $signed(a), $signed(d), $signed(f), expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
