// tb_frequency_counter: with a 20000-cycle gate (standing for one second),
// drives square waves of known period and checks the BCD result of each gate,
// that it is held between gates, and that a result arrives every gate.
// A 2-cycle period (the fastest measurable signal) is included, and counts of
// up to five digits exercise the digit cascade.
module tb_frequency_counter;
  localparam int GATE = 20000;
  logic clk = 0, rst = 1;
  logic frq_clk = 0;
  logic [31:0] frq_value;
  logic valid;
  int checks = 0, failures = 0;
  int half = 5;          // half period of the guest signal in clock cycles

  always #10 clk = ~clk;

  frequency_counter #(.GATE_CYCLES(GATE)) dut (.clk, .rst, .frq_clk, .frq_value, .valid);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // guest signal, changed between clock edges
  int phase = 0;
  int edges_in = 0;
  always @(negedge clk) begin
    if (!rst) begin
      phase++;
      if (phase >= half) begin
        phase = 0;
        if (!frq_clk) edges_in++;
        frq_clk <= ~frq_clk;
      end
    end
  end

  function automatic logic [31:0] to_bcd(int v);
    logic [31:0] b = '0;
    for (int d = 0; d < 8; d++) begin b[4*d +: 4] = 4'(v % 10); v /= 10; end
    return b;
  endfunction

  task automatic expect_gate(int expected, string what);
    int gap = 0;
    do begin @(posedge clk); #1; gap++; end while (!valid);
    checks++;
    if (frq_value !== to_bcd(expected)) begin
      failures++;
      $display("FAIL: %s: got %h expected %0d", what, frq_value, expected);
    end
    checks++;
    if (gap != GATE) begin
      failures++;
      $display("FAIL: %s: result after %0d cycles, gate is %0d", what, gap, GATE);
    end
  endtask

  initial begin
    logic [31:0] held;
    int halves[6] = '{5, 1, 4, 50, 250, 2};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    // first gate: partial start-up window, skip
    while (!valid) begin @(posedge clk); #1; end
    foreach (halves[i]) begin
      automatic int h = halves[i];
      half = h;
      // the window in which the period changes is mixed: skip it
      do begin @(posedge clk); #1; end while (!valid);
      expect_gate(GATE / (2 * h), $sformatf("half period %0d", h));
      held = frq_value;
      repeat (GATE / 2) @(posedge clk);
      #1;
      checks++;
      if (frq_value !== held) begin failures++; $display("FAIL: result not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
