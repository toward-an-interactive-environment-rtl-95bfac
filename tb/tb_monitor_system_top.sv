// tb_monitor_system_top: end-to-end test of the monitoring system with a
// shortened one-second gate (CLK_HZ = 100000, so a "second" is 100000 clocks;
// the VGA timing is the real one).
//
// It plays the software on the register bus and the user at the switches and
// buttons, and checks:
//   - register read/write with byte enables over the bus;
//   - frequency of the guest pin (switch-set source 0), of the internal pixel
//     enable (software-set source 2) and of the second pin (switch-set source
//     3 after software hands control back), both on the frequency output and
//     in the hardware-written register 3;
//   - a program cycle count started and stopped by two software writes of the
//     Done_Start register, on the output and in register 2;
//   - new font and background colours from the switches and buttons;
//   - a user write to the screen, and a user write onto a probe location,
//     which must keep showing its live digit;
//   - one whole frame, pixel by pixel, against an independent rendering of
//     the expected screen.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_monitor_system_top;
  import monitor_pkg::*;
  localparam int CLK_HZ = 100_000;

  logic clk = 0, rst = 1;
  logic [7:0] sw = '0;
  logic [2:0] btn = '0;
  logic guest_sig = 0, aux_sig = 0;
  logic [4:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0;
  logic [3:0] bus_be = '0;
  logic [31:0] bus_rdata;
  logic bus_ack;
  logic usr_we = 0;
  cell_addr_t usr_waddr = '0;
  disp_byte_t usr_wdata = '0;
  logic hsync_n, vsync_n;
  rgb332_t rgb;
  logic [31:0] frq_value, cycle_count;

  int checks = 0, failures = 0;
  int n_freq = 0, n_sw_select = 0, n_soft_select = 0, n_cycle = 0, n_color = 0,
      n_usr_write = 0, n_probe_override = 0, n_hw_reg = 0, n_frames = 0, n_byte_enable = 0;

  always #10 clk = ~clk;

  monitor_system_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst, .sw, .btn, .guest_sig, .aux_sig, .bus_addr, .bus_wr, .bus_rd,
    .bus_wdata, .bus_be, .bus_rdata, .bus_ack, .usr_we, .usr_waddr, .usr_wdata,
    .hsync_n, .vsync_n, .rgb, .frq_value, .cycle_count
  );

  // ---- expected screen and frame checker ------------------------------------
  disp_byte_t screen [NUM_CELLS];
  rgb332_t exp_font = COLOR_WHITE, exp_bg = COLOR_BLUE;
  logic armed = 0;
  int frames_checked, pixels_checked, mismatches;

  vga_frame_checker u_checker (
    .clk, .rst, .ce(dut.pix_ce), .armed, .hsync_n, .vsync_n, .rgb,
    .font_color(exp_font), .bg_color(exp_bg), .screen,
    .frames_checked, .pixels_checked, .mismatches
  );

  task automatic put(int r, int c, string s);
    for (int i = 0; i < s.len(); i++) screen[r * 20 + c + i] = disp_byte_t'(s[i]);
  endtask

  // ---- guest signals: square waves of half periods ghalf / ahalf ----------
  int ghalf = 5, ahalf = 25, gph = 0, aph = 0;
  always @(negedge clk) if (!rst) begin
    if (++gph >= ghalf) begin gph = 0; guest_sig <= ~guest_sig; end
    if (++aph >= ahalf) begin aph = 0; aux_sig <= ~aux_sig; end
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- software and user actions -------------------------------------------
  task automatic bus_write(int a, logic [31:0] d, logic [3:0] be = 4'hF);
    @(negedge clk);
    bus_addr = 5'(a); bus_wdata = d; bus_be = be; bus_wr = 1;
    @(negedge clk);
    bus_wr = 0;
    check(bus_ack, "write acknowledged");
  endtask

  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = 5'(a); bus_rd = 1;
    @(negedge clk);
    bus_rd = 0;
    check(bus_ack, "read acknowledged");
    d = bus_rdata;
  endtask

  task automatic press(int b, logic [7:0] value);
    @(negedge clk); sw = value;
    repeat (4) @(negedge clk);
    btn[b] = 1;
    repeat (6) @(negedge clk);
    btn[b] = 0;
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [31:0] to_bcd(int v);
    logic [31:0] b = '0;
    for (int d = 0; d < 8; d++) begin b[4*d +: 4] = 4'(v % 10); v /= 10; end
    return b;
  endfunction

  // waits out the gate in progress and the next whole one, then checks it
  task automatic measure(int expected, string what);
    logic [31:0] r;
    repeat (2) begin
      do @(posedge clk); while (!dut.frq_valid);
    end
    @(negedge clk);
    check(frq_value == to_bcd(expected), $sformatf("%s: %h, expected %0d", what, frq_value, expected));
    bus_read(REG_FREQUENCY, r);
    check(r == to_bcd(expected), $sformatf("%s in register 3: %h", what, r));
    n_freq++;
    n_hw_reg++;
  endtask

  initial begin
    logic [31:0] r;
    int e1, e2, cyc;
    foreach (screen[i]) screen[i] = 8'h20;
    put(1, 1, "FREQUENCY COUNTER");
    put(3, 1, "F="); put(3, 12, "HZ");
    put(6, 1, "CYCLE COUNTER");
    put(8, 1, "N="); put(8, 12, "CLKS");
    repeat (5) @(posedge clk);
    rst <= 0;

    // shared registers over the bus
    bus_write(7, 32'hA5A5_1234);
    bus_read(7, r);
    check(r == 32'hA5A5_1234, "register 7 read back");
    bus_write(7, 32'h0000_FF00, 4'b0010);
    bus_read(7, r);
    check(r == 32'hA5A5_FF34, "byte-enable write");
    n_byte_enable++;

    // frequency of the guest pin, source 0 set from the switches
    press(2, 8'h00);
    n_sw_select++;
    measure(CLK_HZ / (2 * ghalf), "guest pin");

    // software selects the pixel enable (25 MHz scaled: CLK_HZ / 2)
    bus_write(REG_CONTROL, 32'h8000_0002);
    n_soft_select++;
    measure(CLK_HZ / 2, "pixel enable");

    // switches select the second pin; software hands control back
    press(2, 8'h03);
    bus_write(REG_CONTROL, 32'h0000_0000);
    n_sw_select++;
    measure(CLK_HZ / (2 * ahalf), "second pin");

    // program cycle counter: Done_Start = 01, run, Done_Start = 10
    @(negedge clk);
    bus_addr = 5'(REG_DONE_START); bus_wdata = 32'h1; bus_be = 4'hF; bus_wr = 1;
    @(posedge clk); e1 = int'($time / 20);
    @(negedge clk); bus_wr = 0;
    repeat (1234 + $urandom_range(300)) @(negedge clk);
    bus_wr = 1; bus_wdata = 32'h2;
    @(posedge clk); e2 = int'($time / 20);
    @(negedge clk); bus_wr = 0;
    repeat (3) @(negedge clk);
    cyc = e2 - e1;
    check(cycle_count == 32'(cyc), $sformatf("cycle count %0d, expected %0d", cycle_count, cyc));
    bus_read(REG_CYCLES, r);
    check(r == 32'(cyc), "cycle count in register 2");
    n_cycle++;
    n_hw_reg++;

    // colours from the switches
    press(0, 8'hE0); exp_font = 8'hE0; n_color++;
    press(1, 8'h1C); exp_bg = 8'h1C;   n_color++;

    // user writes to the screen: one plain location, one probe location
    @(negedge clk);
    usr_we = 1; usr_waddr = cell_addr(12, 5); usr_wdata = 8'h58;          // 'X'
    screen[12 * 20 + 5] = 8'h58;
    @(negedge clk);
    usr_waddr = cell_addr(14, 19); usr_wdata = 8'h0F;                     // hex F
    screen[14 * 20 + 19] = 8'h0F;
    @(negedge clk);
    usr_waddr = digit_cell(FREQ_ROW, 0); usr_wdata = 8'h41;              // probe wins
    @(negedge clk);
    usr_we = 0;
    n_usr_write++;
    n_probe_override++;

    // live digits on the screen
    for (int d = 0; d < 8; d++) begin
      screen[digit_cell(FREQ_ROW, d)] = disp_byte_t'(frq_value[4*d +: 4]);
      screen[digit_cell(CYC_ROW, d)]  = disp_byte_t'(cycle_count[4*d +: 4]);
    end
    armed = 1;
    wait (frames_checked >= 1);
    armed = 0;
    check(mismatches == 0, $sformatf("%0d pixel mismatches in a frame", mismatches));
    check(pixels_checked == 800 * 525, "whole frame checked");
    n_frames = frames_checked;

    $display("mechanisms: freq=%0d switch_select=%0d software_select=%0d cycle=%0d colour=%0d user_write=%0d probe_override=%0d hw_reg_write=%0d byte_enable=%0d frames=%0d",
             n_freq, n_sw_select, n_soft_select, n_cycle, n_color, n_usr_write,
             n_probe_override, n_hw_reg, n_byte_enable, n_frames);
    check(n_freq > 0 && n_sw_select > 0 && n_soft_select > 0 && n_cycle > 0 && n_color > 0 &&
          n_usr_write > 0 && n_probe_override > 0 && n_hw_reg > 0 && n_byte_enable > 0 &&
          n_frames > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
