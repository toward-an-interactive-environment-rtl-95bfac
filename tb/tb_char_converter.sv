// tb_char_converter: every byte value against the display encoding: hex
// digits for 0x00..0x0F, ASCII for 0x20..0x5F, blank otherwise.
module tb_char_converter;
  import monitor_pkg::*;
  disp_byte_t value;
  glyph_t     glyph;
  int checks = 0, failures = 0;

  char_converter dut (.value, .glyph);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string hex = "0123456789ABCDEF";
    for (int v = 0; v < 256; v++) begin
      int expected;
      value = disp_byte_t'(v);
      #1;
      if (v < 16)                 expected = int'(hex[v]) - 32;
      else if (v >= 32 && v < 96) expected = v - 32;
      else                        expected = 0;
      checks++;
      if (int'(glyph) != expected) begin
        failures++;
        $display("FAIL: value %02h gave glyph %0d, expected %0d", v, glyph, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
