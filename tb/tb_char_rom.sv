// tb_char_rom: reads whole glyphs pixel by pixel and compares them with
// shapes written out here by hand; also checks the one-read latency and that
// the output holds while the enable is low.
module tb_char_rom;
  import monitor_pkg::*;
  logic clk = 0, en = 0;
  glyph_t glyph;
  logic [2:0] row, col;
  logic pixel_on;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  char_rom dut (.clk, .en, .glyph, .row, .col, .pixel_on);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected shapes, 5 columns wide placed at glyph columns 1..5, rows 0..6
  function automatic bit want(byte ch, int r, int c);
    string s[7];
    case (ch)
      "0": s = '{" ### ","#   #","#  ##","# # #","##  #","#   #"," ### "};
      "1": s = '{"  #  "," ##  ","  #  ","  #  ","  #  ","  #  "," ### "};
      "A": s = '{" ### ","#   #","#   #","#####","#   #","#   #","#   #"};
      "H": s = '{"#   #","#   #","#   #","#####","#   #","#   #","#   #"};
      "Z": s = '{"#####","    #","   # ","  #  "," #   ","#    ","#####"};
      "=": s = '{"     ","     ","#####","     ","#####","     ","     "};
      default: s = '{"     ","     ","     ","     ","     ","     ","     "};
    endcase
    if (r > 6 || c < 1 || c > 5) return 0;
    return s[r][c-1] == "#";
  endfunction

  initial begin
    byte chars[7] = '{"0", "1", "A", "H", "Z", "=", " "};
    foreach (chars[k]) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          @(negedge clk);
          glyph = glyph_t'(chars[k] - 8'h20);
          row = 3'(r); col = 3'(c); en = 1;
          @(negedge clk);
          en = 0;
          // change the address with en low: output must hold
          glyph = ~glyph; row = ~row; col = ~col;
          checks++;
          if (pixel_on !== want(chars[k], r, c)) begin
            failures++;
            $display("FAIL: '%s' row %0d col %0d gave %0b", chars[k], r, c, pixel_on);
          end
          @(negedge clk);
          checks++;
          if (pixel_on !== want(chars[k], r, c)) begin
            failures++;
            $display("FAIL: '%s' row %0d col %0d not held", chars[k], r, c);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
