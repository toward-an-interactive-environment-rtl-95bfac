// tb_program_cycle_counter: software-like flag pulses of random length
// (Done_Start = 01 for N cycles, then 10) must give exactly N; the result must
// hold until the next start; done stops counting even with start still high;
// and the counter must run at one count per clock while busy.
module tb_program_cycle_counter;
  logic clk = 0, rst = 1;
  logic start = 0, done = 0;
  logic [31:0] clks;
  logic busy, finished;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  program_cycle_counter dut (.clk, .rst, .start, .done, .clks, .busy, .finished);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      automatic int n = (t < 5) ? t + 1 : $urandom_range(2000, 1);
      automatic int fin = 0;
      // Done_Start = 01 ... function ... Done_Start = 10
      @(negedge clk); start = 1; done = 0;
      repeat (n) begin
        @(negedge clk);
        check(busy, "busy while the flag is high");
      end
      start = 0; done = 1;
      @(posedge clk); #1;
      check(finished && !busy, "finished pulse when the flag falls");
      check(clks == 32'(n), $sformatf("pulse of %0d cycles counted %0d", n, clks));
      repeat ($urandom_range(30, 1)) begin
        @(posedge clk); #1;
        check(clks == 32'(n) && !finished, "result held");
      end
      @(negedge clk); done = 0;
    end
    // done raised while start is still high: counting stops at done
    @(negedge clk); start = 1;
    repeat (37) @(negedge clk);
    done = 1;
    repeat (10) @(negedge clk);
    check(clks == 32'd37, $sformatf("stop on done: %0d", clks));
    start = 0; done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
