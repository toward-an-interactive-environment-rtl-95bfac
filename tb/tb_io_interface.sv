// tb_io_interface: checks the reset colours, that each button loads the
// switches into its target once per press, and that switch changes without a
// press change nothing.
module tb_io_interface;
  import monitor_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] sw = '0;
  logic [2:0] btn = '0;
  rgb332_t font_color, bg_color;
  logic [1:0] sel_sw;
  logic [2:0] btn_event;
  int checks = 0, failures = 0;
  logic [7:0] exp_font = 8'hFF, exp_bg = 8'h02;
  logic [1:0] exp_sel = 2'd0;

  always #10 clk = ~clk;

  io_interface dut (.clk, .rst, .sw, .btn, .font_color, .bg_color, .sel_sw, .btn_event);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(string when);
    checks++;
    if (font_color !== exp_font || bg_color !== exp_bg || sel_sw !== exp_sel) begin
      failures++;
      $display("FAIL(%s): font %h bg %h sel %0d, expected %h %h %0d", when,
               font_color, bg_color, sel_sw, exp_font, exp_bg, exp_sel);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    check_outputs("reset");
    for (int t = 0; t < 200; t++) begin
      automatic int b = $urandom_range(2);
      automatic int events = 0;
      @(negedge clk); sw = 8'($urandom);
      repeat (4) @(negedge clk);
      check_outputs("switches moved, no press");
      btn[b] = 1;
      case (b)
        0: exp_font = sw;
        1: exp_bg   = sw;
        default: exp_sel = sw[1:0];
      endcase
      repeat ($urandom_range(20, 2)) begin
        @(posedge clk); #1; events += int'(btn_event[b]);
      end
      btn[b] = 0;
      repeat (4) begin @(posedge clk); #1; events += int'(btn_event[b]); end
      checks++;
      if (events != 1) begin failures++; $display("FAIL: %0d events for one press", events); end
      check_outputs($sformatf("after button %0d", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
