// display_ram: one byte per screen location, built as a look-up table.
//
// There are SCREEN_COLS x SCREEN_ROWS (300) locations, numbered row by row.
// Each location is either a stored byte or a probe: NPROBES locations, given
// by PROBE_CELLS, are attached to live signals of interest (probe_data), so a
// register of an application appears on the screen without any copying. The
// stored bytes are written through a simple synchronous write port (we,
// waddr, wdata) and are loaded with the start-up layout of
// monitor_pkg::default_screen on reset. A write to a probe location changes
// the stored byte only; the probe keeps showing its signal.
//
// The read side takes the column and row of the character cell the monitor
// interface is scanning and returns that location's byte combinationally, as
// a distributed (LUT) RAM does. Cells outside the grid read as a blank.
// Locations, LUT construction and the attachment of application registers
// follow the system description; the write port, reset layout and probe
// mechanism are this design's choices.
module display_ram
  import monitor_pkg::*;
#(
  parameter int unsigned NPROBES = NUM_PROBES,
  parameter logic [NPROBES-1:0][CELL_AW-1:0] PROBE_CELLS = default_probe_cells()
) (
  input  logic                    clk,
  input  logic                    rst,
  // write port
  input  logic                    we,
  input  cell_addr_t              waddr,
  input  disp_byte_t              wdata,
  // live signals attached to PROBE_CELLS
  input  disp_byte_t [NPROBES-1:0] probe_data,
  // read port, addressed by the scanned character cell
  input  logic [4:0]              cell_col,
  input  logic [3:0]              cell_row,
  output disp_byte_t              rdata
);
  disp_byte_t mem [NUM_CELLS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NUM_CELLS; i++)
        mem[i] <= default_screen(cell_addr_t'(i));
    end else if (we && int'(waddr) < NUM_CELLS) begin
      mem[waddr] <= wdata;
    end
  end

  cell_addr_t raddr;
  logic       in_grid;

  always_comb begin
    in_grid = (int'(cell_col) < SCREEN_COLS) && (int'(cell_row) < SCREEN_ROWS);
    raddr   = cell_addr_t'(cell_row) * cell_addr_t'(SCREEN_COLS) + cell_addr_t'(cell_col);
    rdata   = in_grid ? mem[raddr] : 8'h20;
    for (int unsigned p = 0; p < NPROBES; p++)
      if (in_grid && raddr == PROBE_CELLS[p]) rdata = probe_data[p];
  end
endmodule
