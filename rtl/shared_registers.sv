// shared_registers: registers shared by software on the processor and by
// hardware modules.
//
// NUM_REGS registers of REG_W bits. Software reaches them through the
// register-access side of a processor bus attachment: one request at a time,
// bus_wr or bus_rd with a word index in bus_addr, byte enables on writes.
// Each request is acknowledged by bus_ack in the next cycle, with read data on
// bus_rdata in that same cycle. Hardware sees every register on hw_regs at
// all times and may overwrite register i by raising hw_we[i] with the value on
// hw_wdata[i]; if software and hardware write the same register in the same
// cycle, hardware wins. Indices past NUM_REGS read as zero and ignore writes.
//
// Twenty registers, reachable from both sides, follow the system
// description. The processor bus itself (PLB) is a vendor component; the
// request/acknowledge signalling here is this design's choice, close to the
// user-logic side of a bus attachment.
module shared_registers
  import monitor_pkg::*;
#(
  parameter int unsigned NUM_REGS = NUM_SHARED_REGS,
  parameter int unsigned AW       = $clog2(NUM_REGS)
) (
  input  logic                           clk,
  input  logic                           rst,
  // software side
  input  logic [AW-1:0]                  bus_addr,
  input  logic                           bus_wr,
  input  logic                           bus_rd,
  input  logic [REG_W-1:0]               bus_wdata,
  input  logic [REG_W/8-1:0]             bus_be,
  output logic [REG_W-1:0]               bus_rdata,
  output logic                           bus_ack,
  // hardware side
  output logic [NUM_REGS-1:0][REG_W-1:0] hw_regs,
  input  logic [NUM_REGS-1:0]            hw_we,
  input  logic [NUM_REGS-1:0][REG_W-1:0] hw_wdata
);
  logic [NUM_REGS-1:0][REG_W-1:0] regs;

  always_ff @(posedge clk) begin
    if (rst) begin
      regs      <= '0;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      bus_ack <= bus_wr | bus_rd;
      if (bus_rd)
        bus_rdata <= (int'(bus_addr) < NUM_REGS) ? regs[bus_addr] : '0;
      for (int unsigned i = 0; i < NUM_REGS; i++) begin
        if (hw_we[i])
          regs[i] <= hw_wdata[i];
        else if (bus_wr && int'(bus_addr) == i)
          for (int unsigned b = 0; b < REG_W / 8; b++)
            if (bus_be[b]) regs[i][8*b +: 8] <= bus_wdata[8*b +: 8];
      end
    end
  end

  assign hw_regs = regs;

  // one request at a time
  assert property (@(posedge clk) disable iff (rst) !(bus_wr && bus_rd))
    else $error("shared_registers: read and write requested together");
endmodule
