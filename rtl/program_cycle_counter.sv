// program_cycle_counter: counts the clock cycles a program section takes.
//
// Software sets a flag (start) in a shared register as the function under
// test begins and clears it, setting done, as the function ends
// (Done_Start = 01, then 10). The counter clears and starts on the rising
// edge of start, counts one per clock cycle while start is high, and stops
// on the falling edge of start or as soon as done is seen high. The result
// then holds in clks until the next rising edge of start. Counting runs at
// the system clock rate, 50 MHz. clks is the number of clock edges at which
// start was sampled high (and done low), i.e. the length of the flag pulse
// in cycles. The result is binary (shown as hexadecimal digits); a count
// past 2^WIDTH-1 wraps.
//
// start and done come from a register in the same clock domain, so no
// synchronizer is used. The edges that start and stop counting follow the
// system description; using done as an extra stop condition and the wrap
// behaviour are this design's choices.
module program_cycle_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             done,
  output logic [WIDTH-1:0] clks,
  output logic             busy,       // counting
  output logic             finished    // one-cycle pulse as counting stops
);
  logic start_q;
  logic rise;

  assign rise = start & ~start_q & ~done;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_q  <= 1'b0;
      clks     <= '0;
      busy     <= 1'b0;
      finished <= 1'b0;
    end else begin
      start_q  <= start;
      finished <= 1'b0;
      if (rise) begin
        clks <= WIDTH'(1);
        busy <= 1'b1;
      end else if (busy) begin
        if (start && !done) begin
          clks <= clks + 1'b1;
        end else begin
          busy     <= 1'b0;
          finished <= 1'b1;
        end
      end
    end
  end
endmodule
