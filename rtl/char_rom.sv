// char_rom: character generator ROM holding 64 glyphs of 8x8 pixels.
//
// Each glyph occupies eight consecutive bytes, one per glyph row, starting at
// address glyph*8; bit 7 of a byte is the leftmost pixel. The ROM is given the
// glyph (its starting address), and the row and column of the pixel being
// scanned, and returns that one pixel. The memory is read synchronously, as a
// block RAM is: the pixel appears on pixel_on one clock edge with en high
// after the address was presented. The 64-glyph, 8x8 organisation follows the
// system description; the glyph set (ASCII 0x20..0x5F, upper case) and the
// shapes are this design's own, loaded from char_rom_font.hex.
module char_rom
  import monitor_pkg::*;
#(
  parameter string FONT_FILE = "rtl/char_rom_font.hex"
) (
  input  logic       clk,
  input  logic       en,         // read enable (the pixel enable)
  input  glyph_t     glyph,      // which character
  input  logic [2:0] row,        // glyph row 0..7
  input  logic [2:0] col,        // glyph column 0..7
  output logic       pixel_on
);
  localparam int unsigned DEPTH = NUM_GLYPHS * GLYPH_BITS;  // 512 bytes

  logic [7:0] rom [DEPTH];
  logic [7:0] row_bits;
  logic [2:0] col_q;

  initial $readmemh(FONT_FILE, rom);

  always_ff @(posedge clk) begin
    if (en) begin
      row_bits <= rom[{glyph, row}];
      col_q    <= col;
    end
  end

  assign pixel_on = row_bits[3'd7 - col_q];
endmodule
