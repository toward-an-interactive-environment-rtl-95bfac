// monitor_interface: VGA scan generator and pixel colouring ("monitor card").
//
// Two counters scan the picture pixel by pixel and line by line (800 pixel
// periods per line, 525 lines per frame: 640x480 visible at 25 MHz gives
// about 60 frames/s) and generate the active-low horizontal and vertical
// sync pulses. While scanning, the block tells the display RAM which
// character cell is under the beam (cell_col, cell_row) and tells the
// character ROM which pixel of that glyph it is (glyph_row, glyph_col): each
// glyph pixel is GLYPH_SCALE x GLYPH_SCALE screen pixels, so the 640x480
// picture is a 20 x 15 grid of characters. The ROM answers with pixel_on,
// which turns the screen pixel to the font colour or the background colour;
// the blanking intervals are black. The colours are 8-bit RGB 3:3:2 values
// for the board's 8 resistor-weighted VGA pins.
//
// Timing: everything advances on clk when ce (the pixel enable) is high.
// The ROM takes one pixel period, so sync and blanking are delayed by one
// pixel period to line up with pixel_on; the colour outputs are driven
// combinationally from those delayed registers and pixel_on. Scanning,
// 60 frames/s and the 8 colour signals follow the system description; the
// 640x480 mode, sync polarities and magnification are this design's choices.
module monitor_interface
  import monitor_pkg::*;
#(
  parameter int unsigned H_VIS   = H_VISIBLE,
  parameter int unsigned H_FP    = H_FRONT,
  parameter int unsigned H_SW    = H_SYNC,
  parameter int unsigned H_BP    = H_BACK,
  parameter int unsigned V_VIS   = V_VISIBLE,
  parameter int unsigned V_FP    = V_FRONT,
  parameter int unsigned V_SW    = V_SYNC,
  parameter int unsigned V_BP    = V_BACK
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,          // pixel enable
  input  rgb332_t    font_color,
  input  rgb332_t    bg_color,
  // to the display RAM
  output logic [4:0] cell_col,
  output logic [3:0] cell_row,
  // to the character ROM
  output logic [2:0] glyph_row,
  output logic [2:0] glyph_col,
  input  logic       pixel_on,    // ROM answer, one pixel period later
  // to the VGA connector
  output logic       hsync_n,
  output logic       vsync_n,
  output rgb332_t    rgb,
  output logic       frame_start  // one-clock pulse as the first visible pixel is scanned
);
  localparam int unsigned H_TOTAL = H_VIS + H_FP + H_SW + H_BP;
  localparam int unsigned V_TOTAL = V_VIS + V_FP + V_SW + V_BP;

  logic [9:0] hcount, vcount;
  logic       active, hs, vs;
  logic       active_q, hs_q, vs_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (ce) begin
      if (hcount == 10'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  always_comb begin
    active = (hcount < 10'(H_VIS)) && (vcount < 10'(V_VIS));
    hs     = (hcount >= 10'(H_VIS + H_FP)) && (hcount < 10'(H_VIS + H_FP + H_SW));
    vs     = (vcount >= 10'(V_VIS + V_FP)) && (vcount < 10'(V_VIS + V_FP + V_SW));
    // glyph magnified by 4: pixel bits [1:0] within a glyph pixel,
    // [4:2] glyph column, [9:5] character cell
    cell_col  = hcount[9:5];
    cell_row  = vcount[8:5];
    glyph_col = hcount[4:2];
    glyph_row = vcount[4:2];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active_q <= 1'b0;
      hs_q     <= 1'b0;
      vs_q     <= 1'b0;
    end else if (ce) begin
      active_q <= active;
      hs_q     <= hs;
      vs_q     <= vs;
    end
  end

  assign hsync_n     = ~hs_q;
  assign vsync_n     = ~vs_q;
  assign rgb         = !active_q ? COLOR_BLACK : (pixel_on ? font_color : bg_color);
  assign frame_start = ce && hcount == '0 && vcount == '0;

  initial assert (GLYPH_SCALE == 4 && H_TOTAL <= 1024 && V_TOTAL <= 1024)
    else $error("monitor_interface: counter slicing assumes 4x glyphs and 10-bit counters");
endmodule
