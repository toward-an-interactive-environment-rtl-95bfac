// tb_display_ram: checks the start-up labels, the out-of-grid blank, writes
// through the write port, and that probe locations show their live signal
// whatever is stored there.
module tb_display_ram;
  import monitor_pkg::*;
  logic clk = 0, rst = 1;
  logic we = 0;
  cell_addr_t waddr = '0;
  disp_byte_t wdata = '0;
  disp_byte_t [NUM_PROBES-1:0] probe_data;
  logic [4:0] cell_col;
  logic [3:0] cell_row;
  disp_byte_t rdata;
  int checks = 0, failures = 0;
  disp_byte_t model [SCREEN_ROWS][SCREEN_COLS];

  always #10 clk = ~clk;

  display_ram dut (.clk, .rst, .we, .waddr, .wdata, .probe_data, .cell_col, .cell_row, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int r, int c, string s);
    for (int i = 0; i < s.len(); i++) model[r][c+i] = disp_byte_t'(s[i]);
  endtask

  function automatic int probe_at(int r, int c);
    if (r == 3 && c >= 3 && c <= 10) return 10 - c;        // frequency digits
    if (r == 8 && c >= 3 && c <= 10) return 8 + 10 - c;    // cycle digits
    return -1;
  endfunction

  task automatic check_all(string when);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 32; c++) begin
        automatic disp_byte_t exp;
        cell_row = 4'(r); cell_col = 5'(c);
        #1;
        if (r >= SCREEN_ROWS || c >= SCREEN_COLS) exp = 8'h20;
        else if (probe_at(r, c) >= 0)             exp = probe_data[probe_at(r, c)];
        else                                      exp = model[r][c];
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL(%s): cell r%0d c%0d read %02h expected %02h", when, r, c, rdata, exp);
        end
      end
  endtask

  initial begin
    foreach (model[r, c]) model[r][c] = 8'h20;
    put(1, 1, "FREQUENCY COUNTER");
    put(3, 1, "F="); put(3, 12, "HZ");
    put(6, 1, "CYCLE COUNTER");
    put(8, 1, "N="); put(8, 12, "CLKS");
    for (int p = 0; p < NUM_PROBES; p++) probe_data[p] = disp_byte_t'(p);
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check_all("reset");
    // random writes, some onto probe locations
    for (int k = 0; k < 400; k++) begin
      automatic int r = $urandom_range(SCREEN_ROWS - 1);
      automatic int c = $urandom_range(SCREEN_COLS - 1);
      @(negedge clk);
      we = 1; waddr = cell_addr_t'(r * SCREEN_COLS + c); wdata = disp_byte_t'($urandom);
      model[r][c] = wdata;
    end
    @(negedge clk);
    we = 1; waddr = 9'd300; wdata = 8'h41;   // outside the grid: ignored
    @(negedge clk);
    we = 0;
    for (int p = 0; p < NUM_PROBES; p++) probe_data[p] = disp_byte_t'($urandom);
    check_all("writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
