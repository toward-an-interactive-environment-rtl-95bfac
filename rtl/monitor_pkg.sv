// monitor_pkg: constants, types and the start-up screen layout shared by the
// character-mode monitor system.
//
// The screen is a grid of character cells. Each 8x8 glyph is magnified by
// GLYPH_SCALE (4) so that a 640x480 picture holds 20 columns by 15 rows, the
// 300 display locations of the system. The VGA timing is the standard
// 640x480 at 60 frames/s mode run from a 25 MHz pixel rate (the 50 MHz board
// clock divided by two).
//
// A display byte is interpreted by the character converter as follows
// (this encoding is a choice of this design):
//   0x00..0x0F  a hexadecimal digit, shown as '0'..'9','A'..'F'
//   0x20..0x5F  a printable ASCII character
//   anything else is shown blank.
// The character ROM holds the 64 glyphs of ASCII 0x20..0x5F; glyph index =
// ASCII code - 0x20.
package monitor_pkg;

  // ---- character grid -------------------------------------------------------
  localparam int unsigned GLYPH_BITS   = 8;    // glyph is 8x8 pixels
  localparam int unsigned GLYPH_SCALE  = 4;    // each glyph pixel is 4x4 screen pixels
  localparam int unsigned SCREEN_COLS  = 20;
  localparam int unsigned SCREEN_ROWS  = 15;
  localparam int unsigned NUM_CELLS    = SCREEN_COLS * SCREEN_ROWS;   // 300
  localparam int unsigned CELL_AW      = 9;    // cell address width
  localparam int unsigned NUM_GLYPHS   = 64;

  typedef logic [CELL_AW-1:0] cell_addr_t;
  typedef logic [5:0]         glyph_t;
  typedef logic [7:0]         disp_byte_t;

  // ---- 640x480 @ 60 Hz timing (pixels / lines) --------------------------------
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;

  // ---- colours: 8 VGA pins, 3 red, 3 green, 2 blue ---------------------------
  typedef struct packed {
    logic [2:0] red;
    logic [2:0] green;
    logic [1:0] blue;
  } rgb332_t;

  localparam rgb332_t COLOR_WHITE = '{red: 3'b111, green: 3'b111, blue: 2'b11};
  localparam rgb332_t COLOR_BLUE  = '{red: 3'b000, green: 3'b000, blue: 2'b10};
  localparam rgb332_t COLOR_BLACK = '0;

  // ---- register bus between processor and the shared registers --------------
  localparam int unsigned NUM_SHARED_REGS = 20;
  localparam int unsigned REG_W           = 32;

  // Register map used by the top level
  localparam int unsigned REG_DONE_START  = 0;  // [0] start flag, [1] done flag (software)
  localparam int unsigned REG_CONTROL     = 1;  // [1:0] frequency source, [31] software selects
  localparam int unsigned REG_CYCLES      = 2;  // cycle count (hardware writes)
  localparam int unsigned REG_FREQUENCY   = 3;  // frequency, BCD (hardware writes)

  // ---- display locations of the two example applications ---------------------
  // Eight frequency digits occupy row 3, columns 3..10 (most significant left);
  // eight cycle-count digits occupy row 8, columns 3..10.
  localparam int unsigned FREQ_ROW  = 3;
  localparam int unsigned CYC_ROW   = 8;
  localparam int unsigned DIGIT_COL = 3;
  localparam int unsigned NUM_DIGITS = 8;

  function automatic cell_addr_t cell_addr(int unsigned row, int unsigned col);
    return cell_addr_t'(row * SCREEN_COLS + col);
  endfunction

  // Cell of digit d (d = 0 is the least significant) in a row of 8 digits.
  function automatic cell_addr_t digit_cell(int unsigned row, int unsigned d);
    return cell_addr(row, DIGIT_COL + NUM_DIGITS - 1 - d);
  endfunction

  // Probe cells wired to live signals: 8 frequency digits, then 8 cycle digits.
  localparam int unsigned NUM_PROBES = 2 * NUM_DIGITS;

  function automatic logic [NUM_PROBES-1:0][CELL_AW-1:0] default_probe_cells();
    logic [NUM_PROBES-1:0][CELL_AW-1:0] p;
    for (int unsigned d = 0; d < NUM_DIGITS; d++) begin
      p[d]              = digit_cell(FREQ_ROW, d);
      p[NUM_DIGITS + d] = digit_cell(CYC_ROW, d);
    end
    return p;
  endfunction

  // Byte i (counted from the left) of the n-character text s; a string
  // literal assigned to s is right-aligned in it. Past the end: blank.
  localparam int unsigned TEXT_MAX = 20;
  function automatic disp_byte_t text_at(logic [8*TEXT_MAX-1:0] s, int unsigned n, int unsigned i);
    if (i < n) return s[8*(n-1-i) +: 8];
    return 8'h20;
  endfunction

  // Start-up contents of display cell a: fixed labels around the live digits.
  function automatic disp_byte_t default_screen(cell_addr_t a);
    int unsigned row = int'(a) / SCREEN_COLS;
    int unsigned col = int'(a) % SCREEN_COLS;
    disp_byte_t b = 8'h20;
    case (row)
      1:  if (col >= 1)  b = text_at("FREQUENCY COUNTER", 17, col - 1);
      3:  if (col == 1)  b = 8'h46;             // 'F'
          else if (col == 2)  b = 8'h3D;        // '='
          else if (col >= 12) b = text_at("HZ", 2, col - 12);
      6:  if (col >= 1)  b = text_at("CYCLE COUNTER", 13, col - 1);
      8:  if (col == 1)  b = 8'h4E;             // 'N'
          else if (col == 2)  b = 8'h3D;        // '='
          else if (col >= 12) b = text_at("CLKS", 4, col - 12);
      default: b = 8'h20;
    endcase
    return b;
  endfunction

endpackage
