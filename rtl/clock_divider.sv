// clock_divider: derives the VGA pixel rate from the 50 MHz board clock.
//
// Rather than producing a second clock (and the clock-gating and skew issues
// that come with a logic-generated clock on an FPGA), the divider emits a
// one-cycle enable pulse, ce, every DIVIDE cycles of clk. Every block of the
// display path runs on clk and advances only when ce is high. DIVIDE = 2
// turns 50 MHz into the 25 MHz pixel rate of a 640x480, 60 frames/s picture.
// The divider itself is named in the system's block diagram; its form (an
// enable rather than a clock) is this design's choice.
//
// Timing: after rst is released, ce is high on the DIVIDE-th clock edge and
// every DIVIDE clock edges after that.
module clock_divider #(
  parameter int unsigned DIVIDE = 2
) (
  input  logic clk,
  input  logic rst,
  output logic ce
);
  localparam int unsigned CW = (DIVIDE > 1) ? $clog2(DIVIDE) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      ce    <= 1'b0;
    end else if (count == CW'(DIVIDE - 1)) begin
      count <= '0;
      ce    <= 1'b1;
    end else begin
      count <= count + 1'b1;
      ce    <= 1'b0;
    end
  end

  initial assert (DIVIDE >= 2) else $error("clock_divider: DIVIDE must be at least 2");
endmodule
