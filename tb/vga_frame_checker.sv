// vga_frame_checker: testbench helper that compares every visible pixel the
// system sends to the VGA pins against a rendering of its own.
//
// It follows the scan position by counting pixel enables from reset (the
// scan starts at the top-left corner, and each enable's output shows the
// position of the previous enable), renders the expected character screen
// from `screen` (one byte per location) with the glyph table read from the
// font file, and counts matching and mismatching pixels of whole frames
// while `armed` is high. Sync pulses are checked in every pixel period.
module vga_frame_checker
  import monitor_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       armed,
  input  logic       hsync_n,
  input  logic       vsync_n,
  input  rgb332_t    rgb,
  input  rgb332_t    font_color,
  input  rgb332_t    bg_color,
  input  disp_byte_t screen [NUM_CELLS],
  output int         frames_checked,
  output int         pixels_checked,
  output int         mismatches
);
  logic [7:0] font [512];
  initial $readmemh("rtl/char_rom_font.hex", font);

  function automatic int glyph_of(disp_byte_t b);
    if (b < 8'h0A) return 16 + int'(b);
    if (b < 8'h10) return 33 + int'(b) - 10;
    if (b >= 8'h20 && b < 8'h60) return int'(b) - 32;
    return 0;
  endfunction

  int  pos;          // position shown by the outputs after the latest enable
  int  n_ce;         // enables seen since reset
  bit  ce_q;         // the latest clock edge had the enable high
  bit  in_frame;

  always @(posedge clk) begin
    if (rst) begin
      n_ce <= 0; ce_q <= 0;
    end else begin
      ce_q <= ce;
      if (ce) n_ce <= n_ce + 1;
    end
  end

  // checks happen half a cycle after each enable's edge
  always @(negedge clk) begin
    if (rst) begin
      frames_checked = 0; pixels_checked = 0; mismatches = 0; in_frame = 0;
    end else if (ce_q && n_ce > 0) begin
      int x, y;
      rgb332_t want;
      pos = (n_ce - 1) % (800 * 525);
      x = pos % 800; y = pos / 800;
      if (pos == 0) in_frame = armed;
      if (in_frame) begin
        if (x < 640 && y < 480) begin
          automatic int g = glyph_of(screen[(y / 32) * 20 + x / 32]);
          want = font[g * 8 + (y / 4) % 8][7 - (x / 4) % 8] ? font_color : bg_color;
        end else want = '0;
        pixels_checked++;
        if (rgb !== want || hsync_n !== !(x >= 656 && x < 752) || vsync_n !== !(y >= 490 && y < 492)) begin
          if (mismatches < 10) $display("checker: mismatch at x=%0d y=%0d rgb %h want %h", x, y, rgb, want);
          mismatches++;
        end
        if (pos == 800 * 525 - 1) begin frames_checked++; in_frame = 0; end
      end
    end
  end
endmodule
