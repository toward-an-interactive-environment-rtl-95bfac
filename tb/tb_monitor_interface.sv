// tb_monitor_interface: scans two whole 640x480 frames with the pixel enable
// high every second clock (25 MHz from 50 MHz) and checks, against a scan
// model of its own, every pixel period: the cell and glyph coordinates sent
// to RAM and ROM, the sync pulses, blanking, and the font/background colour
// chosen by the ROM answer one pixel period later. Also checks the line
// (800 pixel periods) and frame (525 lines) lengths, i.e. 59.5 frames/s.
module tb_monitor_interface;
  import monitor_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  rgb332_t font_color = 8'hE4, bg_color = 8'h13;
  logic [4:0] cell_col;
  logic [3:0] cell_row;
  logic [2:0] glyph_row, glyph_col;
  logic pixel_on = 0;
  logic hsync_n, vsync_n, frame_start;
  rgb332_t rgb;
  int checks = 0, failures = 0, bad = 0;

  always #10 clk = ~clk;

  monitor_interface dut (.clk, .rst, .ce, .font_color, .bg_color, .cell_col, .cell_row,
                         .glyph_row, .glyph_col, .pixel_on, .hsync_n, .vsync_n, .rgb,
                         .frame_start);

  // a stand-in ROM: registered, one pixel period of latency, some pattern
  function automatic logic pattern(logic [4:0] cc, logic [3:0] cr, logic [2:0] gr, logic [2:0] gc);
    return ^{cc, cr, gr, gc, gr[0] & gc[1]};
  endfunction
  always_ff @(posedge clk) if (ce) pixel_on <= pattern(cell_col, cell_row, glyph_row, glyph_col);

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (bad++ < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int h = 0, v = 0, ph, pv;
    int ce_count = 0, last_vs_fall = -1, last_hs_fall = -1, hs_in_frame = 0;
    logic prev_hs = 1, prev_vs = 1;
    int frames = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(cell_col == 0 && cell_row == 0 && glyph_col == 0 && glyph_row == 0, "scan starts at 0,0");
    while (frames < 2) begin
      @(negedge clk); ce = 1; #1;
      check(frame_start == (h == 0 && v == 0), "frame_start");
      @(negedge clk); ce = 0;
      ce_count++;
      ph = h; pv = v;
      h++;
      if (h == 800) begin h = 0; v = (v == 524) ? 0 : v + 1; end
      // coordinates of the new position
      check(cell_col == 5'(h / 32) && cell_row == 4'(v / 32) &&
            glyph_col == 3'((h / 4) % 8) && glyph_row == 3'((v / 4) % 8),
            $sformatf("coordinates at %0d,%0d", h, v));
      // outputs for the previous position
      check(hsync_n == !(ph >= 656 && ph < 752), $sformatf("hsync at %0d", ph));
      check(vsync_n == !(pv >= 490 && pv < 492), $sformatf("vsync at line %0d", pv));
      if (ph < 640 && pv < 480)
        check(rgb == (pattern(5'(ph / 32), 4'(pv / 32), 3'((pv / 4) % 8), 3'((ph / 4) % 8))
                      ? font_color : bg_color), $sformatf("colour at %0d,%0d", ph, pv));
      else
        check(rgb == 8'h00, $sformatf("blank at %0d,%0d", ph, pv));
      // line and frame lengths, measured on the sync outputs
      if (prev_hs && !hsync_n) begin
        if (last_hs_fall >= 0) check(ce_count - last_hs_fall == 800, "line length 800");
        last_hs_fall = ce_count;
        hs_in_frame++;
      end
      if (prev_vs && !vsync_n) begin
        if (last_vs_fall >= 0) begin
          check(ce_count - last_vs_fall == 800 * 525, "frame length 420000 pixel periods");
          check(hs_in_frame == 525, $sformatf("%0d lines per frame", hs_in_frame));
          frames++;
        end
        last_vs_fall = ce_count;
        hs_in_frame = 0;
      end
      prev_hs = hsync_n; prev_vs = vsync_n;
    end
    // 25 MHz / 420000 = 59.52 frames per second
    check(25_000_000 / (800 * 525) == 59, "about 60 frames per second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
