// monitor_system_top: an FPGA debugging environment that shows a design's
// signals of interest as text on a VGA monitor, with two example
// applications, a frequency counter and a program cycle counter.
//
// Display path (all on the 50 MHz clock, advanced by the pixel enable):
//   clock_divider -> ce (25 MHz)
//   monitor_interface scans 640x480 @ 60 Hz and names the character cell
//   -> display_ram returns the byte stored at (or attached to) that cell
//   -> char_converter turns it into a glyph index
//   -> char_rom returns the pixel of that glyph, one pixel period later
//   -> monitor_interface drives font or background colour onto the 8 pins.
//
// Processor side: the soft-core processor and its bus are outside this
// design; their register accesses arrive on the bus_* ports and reach
// shared_registers, twenty 32-bit registers also seen by the hardware:
//   reg 0  Done_Start flag: bit 0 start, bit 1 done (written by software)
//   reg 1  control: bits [1:0] frequency source, bit 31 = software chooses
//          (otherwise the switch-set selection of io_interface is used)
//   reg 2  last cycle count (written by hardware when counting stops)
//   reg 3  last frequency, BCD (written by hardware every second)
//   reg 4..19 free for user designs
//
// Applications: signal_mux picks the frequency counter's input among the
// guest pin (source 0), the monitor's own vertical sync (1), the pixel
// enable (2) and a second external pin (3). The eight frequency digits are
// attached to row 3 of the screen and the eight hexadecimal cycle-count
// digits to row 8, next to labels loaded at reset. User logic may write any
// screen location through usr_we/usr_waddr/usr_wdata.
//
// Block set and data flow follow the system description; the register map,
// screen layout and multiplexer inputs are this design's choices.
module monitor_system_top
  import monitor_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned PIXEL_DIV = 2
) (
  input  logic                         clk,         // 50 MHz board oscillator
  input  logic                         rst,
  // board I/O
  input  logic [7:0]                   sw,
  input  logic [2:0]                   btn,
  input  logic                         guest_sig,   // external pin under measurement
  input  logic                         aux_sig,     // second external pin
  // processor bus (register accesses of the software)
  input  logic [$clog2(NUM_SHARED_REGS)-1:0] bus_addr,
  input  logic                         bus_wr,
  input  logic                         bus_rd,
  input  logic [REG_W-1:0]             bus_wdata,
  input  logic [REG_W/8-1:0]           bus_be,
  output logic [REG_W-1:0]             bus_rdata,
  output logic                         bus_ack,
  // user writes into the screen
  input  logic                         usr_we,
  input  cell_addr_t                   usr_waddr,
  input  disp_byte_t                   usr_wdata,
  // VGA connector
  output logic                         hsync_n,
  output logic                         vsync_n,
  output rgb332_t                      rgb,
  // application results, also visible on screen and in the registers
  output logic [4*NUM_DIGITS-1:0]      frq_value,
  output logic [REG_W-1:0]             cycle_count
);
  // ---- clock divider ----------------------------------------------------------
  logic pix_ce;
  clock_divider #(.DIVIDE(PIXEL_DIV)) u_div (.clk, .rst, .ce(pix_ce));

  // ---- switches and buttons ---------------------------------------------------
  rgb332_t    font_color, bg_color;
  logic [1:0] sel_sw;
  io_interface #(.SEL_W(2)) u_io (
    .clk, .rst, .sw, .btn, .font_color, .bg_color, .sel_sw, .btn_event()
  );

  // ---- shared registers -------------------------------------------------------
  logic [NUM_SHARED_REGS-1:0][REG_W-1:0] hw_regs, hw_wdata;
  logic [NUM_SHARED_REGS-1:0]            hw_we;
  logic                                  frq_valid, cyc_finished;

  shared_registers u_regs (
    .clk, .rst, .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_be, .bus_rdata,
    .bus_ack, .hw_regs, .hw_we, .hw_wdata
  );

  always_comb begin
    hw_we    = '0;
    hw_wdata = '0;
    hw_we[REG_CYCLES]       = cyc_finished;
    hw_wdata[REG_CYCLES]    = cycle_count;
    hw_we[REG_FREQUENCY]    = frq_valid;
    hw_wdata[REG_FREQUENCY] = REG_W'(frq_value);
  end

  // ---- frequency counter and its input multiplexer ----------------------------
  logic [1:0] frq_sel;
  logic       frq_in;
  assign frq_sel = hw_regs[REG_CONTROL][31] ? hw_regs[REG_CONTROL][1:0] : sel_sw;

  signal_mux #(.N(4)) u_mux (
    .sig({aux_sig, pix_ce, ~vsync_n, guest_sig}), .sel(frq_sel), .out(frq_in)
  );

  frequency_counter #(.GATE_CYCLES(CLK_HZ), .DIGITS(NUM_DIGITS)) u_freq (
    .clk, .rst, .frq_clk(frq_in), .frq_value, .valid(frq_valid)
  );

  // ---- program cycle counter ---------------------------------------------------
  program_cycle_counter #(.WIDTH(REG_W)) u_cyc (
    .clk, .rst,
    .start(hw_regs[REG_DONE_START][0]),
    .done (hw_regs[REG_DONE_START][1]),
    .clks (cycle_count), .busy(), .finished(cyc_finished)
  );

  // ---- display path ------------------------------------------------------------
  disp_byte_t [NUM_PROBES-1:0] probe_data;
  always_comb
    for (int unsigned d = 0; d < NUM_DIGITS; d++) begin
      probe_data[d]              = {4'h0, frq_value[4*d +: 4]};
      probe_data[NUM_DIGITS + d] = {4'h0, cycle_count[4*d +: 4]};
    end

  logic [4:0] cell_col;
  logic [3:0] cell_row;
  logic [2:0] glyph_row, glyph_col;
  logic       pixel_on;
  disp_byte_t cell_byte;
  glyph_t     glyph;

  monitor_interface u_mon (
    .clk, .rst, .ce(pix_ce), .font_color, .bg_color, .cell_col, .cell_row,
    .glyph_row, .glyph_col, .pixel_on, .hsync_n, .vsync_n, .rgb, .frame_start()
  );

  display_ram u_ram (
    .clk, .rst, .we(usr_we), .waddr(usr_waddr), .wdata(usr_wdata),
    .probe_data, .cell_col, .cell_row, .rdata(cell_byte)
  );

  char_converter u_conv (.value(cell_byte), .glyph);

  char_rom u_rom (
    .clk, .en(pix_ce), .glyph, .row(glyph_row), .col(glyph_col), .pixel_on
  );
endmodule
