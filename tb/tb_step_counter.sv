// tb_step_counter: self-checking testbench for step_counter. Runs two
// instances, N = 8 (the default) and N = 5 (not a power of two), under the
// same random op-codes and checks zi against a reference count: zi must be
// high exactly when the count equals N-1.
module tb_step_counter;
  import wsm_pkg::*;
  logic clk = 0, rst_n = 0;
  sop_e sop;
  logic zi8, zi5;
  int cnt8, cnt5;
  int checks = 0, failures = 0, zi_seen = 0;

  step_counter #(.N(8)) dut8 (.clk, .rst_n, .sop, .zi(zi8));
  step_counter #(.N(5)) dut5 (.clk, .rst_n, .sop, .zi(zi5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sop = S_NOP; cnt8 = 0; cnt5 = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // mostly count, so that the full range is covered
      sop = ($urandom_range(0, 9) < 7) ? S_CNT : sop_e'($urandom_range(0, 3));
      @(posedge clk); #1;
      case (sop)
        S_CNT: begin cnt8 = (cnt8 + 1) % 8; cnt5 = (cnt5 + 1) % 8; end
        S_RESET, S_RESET3: begin cnt8 = 0; cnt5 = 0; end
        default: ;
      endcase
      checks += 2;
      if (zi8 !== (cnt8 == 7)) begin failures++; $display("zi8 wrong at count %0d", cnt8); end
      if (zi5 !== (cnt5 == 4)) begin failures++; $display("zi5 wrong at count %0d", cnt5); end
      if (zi8) zi_seen++;
    end
    checks++; if (zi_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
