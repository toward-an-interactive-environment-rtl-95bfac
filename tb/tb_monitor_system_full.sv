// tb_monitor_system_full: one complete measurement at the real sizes: the
// system with its default parameters (50 MHz clock, one-second gate of
// 50,000,000 clocks, 640x480 at 60 frames/s).
//
// A 6.25 MHz square wave on the guest pin is measured over a whole gate
// second; the result must read 06250000 on the frequency output, in shared
// register 3 over the bus, and as the eight digits on the screen, checked
// pixel by pixel over one whole frame. Software then selects the monitor's
// own vertical sync as the signal of interest; the next whole second must
// count 59 or 60 frames (25 MHz / 420000 pixel periods = 59.5 Hz).
module tb_monitor_system_full;
  import monitor_pkg::*;

  logic clk = 0, rst = 1;
  logic [7:0] sw = '0;
  logic [2:0] btn = '0;
  logic guest_sig = 0, aux_sig = 0;
  logic [4:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0;
  logic [3:0] bus_be = 4'hF;
  logic [31:0] bus_rdata;
  logic bus_ack;
  logic usr_we = 0;
  cell_addr_t usr_waddr = '0;
  disp_byte_t usr_wdata = '0;
  logic hsync_n, vsync_n;
  rgb332_t rgb;
  logic [31:0] frq_value, cycle_count;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  monitor_system_top dut (
    .clk, .rst, .sw, .btn, .guest_sig, .aux_sig, .bus_addr, .bus_wr, .bus_rd,
    .bus_wdata, .bus_be, .bus_rdata, .bus_ack, .usr_we, .usr_waddr, .usr_wdata,
    .hsync_n, .vsync_n, .rgb, .frq_value, .cycle_count
  );

  disp_byte_t screen [NUM_CELLS];
  logic armed = 0;
  int frames_checked, pixels_checked, mismatches;

  vga_frame_checker u_checker (
    .clk, .rst, .ce(dut.pix_ce), .armed, .hsync_n, .vsync_n, .rgb,
    .font_color(COLOR_WHITE), .bg_color(COLOR_BLUE), .screen,
    .frames_checked, .pixels_checked, .mismatches
  );

  // 6.25 MHz: the guest pin toggles every 4 clocks
  int ph = 0;
  always @(negedge clk) if (!rst) begin
    if (++ph >= 4) begin ph = 0; guest_sig <= ~guest_sig; end
  end

  initial begin
    repeat (300_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(int r, int c, string s);
    for (int i = 0; i < s.len(); i++) screen[r * 20 + c + i] = disp_byte_t'(s[i]);
  endtask

  task automatic next_result();
    do @(posedge clk); while (!dut.frq_valid);
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    foreach (screen[i]) screen[i] = 8'h20;
    put(1, 1, "FREQUENCY COUNTER");
    put(3, 1, "F="); put(3, 12, "HZ");
    put(6, 1, "CYCLE COUNTER");
    put(8, 1, "N="); put(8, 12, "CLKS");
    for (int d = 0; d < 8; d++) screen[digit_cell(CYC_ROW, d)] = 8'h00;
    repeat (5) @(posedge clk);
    rst <= 0;

    next_result();              // first second: started at reset
    next_result();              // a whole second of the 6.25 MHz signal
    check(frq_value == 32'h0625_0000, $sformatf("guest pin measured %h", frq_value));
    @(negedge clk); bus_addr = 5'(REG_FREQUENCY); bus_rd = 1;
    @(negedge clk); bus_rd = 0;
    check(bus_ack && bus_rdata == 32'h0625_0000, $sformatf("register 3 reads %h", bus_rdata));
    for (int d = 0; d < 8; d++) screen[digit_cell(FREQ_ROW, d)] = disp_byte_t'(frq_value[4*d +: 4]);
    armed = 1;
    wait (frames_checked >= 1);
    armed = 0;
    check(mismatches == 0 && pixels_checked == 800 * 525,
          $sformatf("frame showing the result: %0d mismatches", mismatches));

    // software selects the vertical sync as the signal of interest
    @(negedge clk); bus_addr = 5'(REG_CONTROL); bus_wdata = 32'h8000_0001; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
    next_result();
    next_result();
    check(frq_value == 32'h0000_0059 || frq_value == 32'h0000_0060,
          $sformatf("frame rate measured %h", frq_value));
    $display("frequency %h Hz, frame rate %h frames/s", 32'h0625_0000, frq_value);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
