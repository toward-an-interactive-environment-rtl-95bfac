// char_converter: maps the byte stored at a display location to the glyph the
// character ROM draws for it.
//
// The display RAM holds the value of a signal of interest; this block decides
// which character shape represents it. Values 0x00..0x0F are shown as the
// hexadecimal digits '0'..'9','A'..'F', so a counter nibble can be stored in
// a display location without conversion; 0x20..0x5F are shown as the ASCII
// characters they encode, so labels can be written as text; every other value
// is shown blank. The glyph index is the ASCII code minus 0x20. Purely
// combinational. That such a converter sits between RAM and ROM follows the
// system description; the encoding is this design's choice.
module char_converter
  import monitor_pkg::*;
(
  input  disp_byte_t value,
  output glyph_t     glyph
);
  always_comb begin
    if (value < 8'h0A)
      glyph = glyph_t'(8'h30 + value - 8'h20);          // '0'..'9'
    else if (value < 8'h10)
      glyph = glyph_t'(8'h41 + (value - 8'h0A) - 8'h20); // 'A'..'F'
    else if (value >= 8'h20 && value < 8'h60)
      glyph = glyph_t'(value - 8'h20);
    else
      glyph = '0;                                         // blank
  end
endmodule
