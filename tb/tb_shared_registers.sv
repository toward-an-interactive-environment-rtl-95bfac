// tb_shared_registers: random software reads and writes with byte enables and
// random hardware writes, all against a model of the twenty registers; checks
// the one-cycle acknowledge, hardware priority on a collision, the hardware
// view of every register and that indices past the last register read 0.
module tb_shared_registers;
  localparam int N = 20;
  logic clk = 0, rst = 1;
  logic [4:0]  bus_addr = '0;
  logic        bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0;
  logic [3:0]  bus_be = '0;
  logic [31:0] bus_rdata;
  logic        bus_ack;
  logic [N-1:0][31:0] hw_regs, hw_wdata;
  logic [N-1:0]       hw_we;
  logic [31:0] model [N];
  int checks = 0, failures = 0, collisions = 0;

  always #10 clk = ~clk;

  shared_registers dut (.clk, .rst, .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_be,
                        .bus_rdata, .bus_ack, .hw_regs, .hw_we, .hw_wdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    hw_we = '0; hw_wdata = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int op = $urandom_range(2);          // 0 idle, 1 write, 2 read
      automatic int a  = $urandom_range(23);
      automatic logic [31:0] expected_rd = (a < N) ? model[a] : 32'h0;
      @(negedge clk);
      bus_wr = (op == 1); bus_rd = (op == 2);
      bus_addr = 5'(a); bus_wdata = $urandom; bus_be = 4'($urandom);
      hw_we = '0;
      for (int i = 0; i < N; i++)
        if ($urandom_range(15) == 0) begin hw_we[i] = 1; hw_wdata[i] = $urandom; end
      // model update at the coming edge
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (hw_we[i]) begin
          if (bus_wr && a == i) collisions++;
          model[i] = hw_wdata[i];
        end else if (bus_wr && a == i)
          for (int b = 0; b < 4; b++) if (bus_be[b]) model[i][8*b +: 8] = bus_wdata[8*b +: 8];
      end
      #1;
      check(bus_ack == (op != 0), "acknowledge one cycle after the request");
      if (op == 2) check(bus_rdata == expected_rd, $sformatf("read of reg %0d: %h vs %h", a, bus_rdata, expected_rd));
      for (int i = 0; i < N; i++) check(hw_regs[i] == model[i], $sformatf("hardware view of reg %0d", i));
    end
    @(negedge clk); bus_wr = 0; bus_rd = 0; hw_we = '0;
    check(collisions > 0, "a software/hardware collision happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
