// tb_clock_divider: checks that the pixel enable is one cycle high every
// DIVIDE cycles, for the system's DIVIDE = 2 and for DIVIDE = 5, and that the
// first pulse comes DIVIDE cycles after reset.
module tb_clock_divider;
  logic clk = 0, rst = 1;
  logic ce2, ce5;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  clock_divider #(.DIVIDE(2)) dut2 (.clk, .rst, .ce(ce2));
  clock_divider #(.DIVIDE(5)) dut5 (.clk, .rst, .ce(ce5));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n2 = 0, n5 = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 1; cyc <= 200; cyc++) begin
      @(posedge clk); #1;
      // ce goes high on the DIVIDE-th edge after reset release
      check(ce2 == (cyc % 2 == 0), $sformatf("ce2 at cycle %0d", cyc));
      check(ce5 == (cyc % 5 == 0), $sformatf("ce5 at cycle %0d", cyc));
      n2 += int'(ce2);
      n5 += int'(ce5);
    end
    check(n2 == 100, "ce2 rate");
    check(n5 == 40,  "ce5 rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
